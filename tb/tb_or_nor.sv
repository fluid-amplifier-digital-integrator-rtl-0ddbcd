// Testbench for or_nor: all four input combinations against the OR / NOR
// truth table.
module tb_or_nor;
  logic a, b, or_out, nor_out;
  int checks = 0, failures = 0;

  or_nor dut (.a(a), .b(b), .or_out(or_out), .nor_out(nor_out));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (or_out !== (i != 0) || nor_out !== (i == 0)) begin
        failures++;
        $display("FAIL a=%b b=%b or=%b nor=%b", a, b, or_out, nor_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
