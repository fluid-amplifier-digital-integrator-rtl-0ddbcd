// Testbench for half_adder_stage: every input pair against the half-adder
// truth table (sum = a xor b, carry = a and b) and the complement outputs.
module tb_half_adder_stage;
  logic a, b, s, s_n, c, c_n;
  int checks = 0, failures = 0;

  half_adder_stage dut (.a(a), .b(b), .s(s), .s_n(s_n), .c(c), .c_n(c_n));

  // Truth table: A 0 1 0 1 / B 0 0 1 1 / S 0 1 1 0 / C 0 0 0 1
  localparam logic [3:0] S_TABLE = 4'b0110;  // index {b,a}
  localparam logic [3:0] C_TABLE = 4'b1000;

  initial begin
    for (int i = 0; i < 4; i++) begin
      a = i[0];
      b = i[1];
      #1;
      checks += 2;
      if (s !== S_TABLE[i] || s_n !== ~S_TABLE[i]) begin
        failures++;
        $display("FAIL sum a=%b b=%b s=%b s_n=%b", a, b, s, s_n);
      end
      if (c !== C_TABLE[i] || c_n !== ~C_TABLE[i]) begin
        failures++;
        $display("FAIL carry a=%b b=%b c=%b c_n=%b", a, b, c, c_n);
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
