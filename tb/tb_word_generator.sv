// Testbench for word_generator: with five T pulses and one gap period per
// iteration, the default generator must send 10101 and a second one built
// for 11101 must send that word, least significant bit first in T1..T5, with
// y_l_n its inverse during bit times and both outputs low in the gap, for 50
// iterations running.
module tb_word_generator;
  localparam int W = 5;
  logic clk = 0, rst_n = 0, t = 0;
  logic y_a, y_a_n, y_b, y_b_n;
  int checks = 0, failures = 0;

  word_generator dut_a (.clk(clk), .rst_n(rst_n), .t(t), .y_l(y_a), .y_l_n(y_a_n));
  word_generator #(.WIDTH(W), .WORD(5'b11101)) dut_b (
    .clk(clk), .rst_n(rst_n), .t(t), .y_l(y_b), .y_l_n(y_b_n)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [W-1:0] wa, wb;
    #12 rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      for (int k = 0; k < W; k++) begin
        @(negedge clk);
        t = 1;
        #1;
        wa[k] = y_a;
        wb[k] = y_b;
        check(y_a_n == !y_a && y_b_n == !y_b, "inverse output");
      end
      @(negedge clk);
      t = 0;
      #1;
      check(!y_a && !y_a_n && !y_b && !y_b_n, "output in the gap");
      check(wa == 5'b10101, $sformatf("word a %b", wa));
      check(wb == 5'b11101, $sformatf("word b %b", wb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
