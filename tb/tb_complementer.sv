// Testbench for complementer.  Words are fed least significant bit first in
// five bit times, then one gap period with RESET.  Checks: 10101 with the
// control absent comes out as 01011 (bit times T1..T5: 1,1,0,1,0); then random
// words, with the control present the output equals the input and with it
// absent the output is the two's complement (32 - N) mod 32.
module tb_complementer;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  logic t = 0, reset_p = 0, ctrl = 1, e = 0;
  logic g, g_n;
  int checks = 0, failures = 0;

  complementer dut (
    .clk(clk), .rst_n(rst_n), .t(t), .reset_p(reset_p),
    .ctrl(ctrl), .e(e), .g(g), .g_n(g_n)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic iterate(input logic [W-1:0] ew, input logic c, output logic [W-1:0] gw);
    for (int k = 0; k < W; k++) begin
      @(negedge clk);
      t = 1; reset_p = 0; ctrl = c; e = ew[k];
      #1;
      gw[k] = g;
      check(g_n === ~g, "g_n is not ~g");
    end
    @(negedge clk);
    t = 0; reset_p = 1; e = 0;
  endtask

  initial begin
    logic [W-1:0] gw;
    #12 rst_n = 1;
    iterate(5'b10101, 1'b0, gw);
    check(gw == 5'b01011, $sformatf("complement of 10101 gave %b", gw));
    iterate(5'b10101, 1'b1, gw);
    check(gw == 5'b10101, $sformatf("pass of 10101 gave %b", gw));
    iterate(5'b01100, 1'b0, gw);
    check(gw == 5'b10100, $sformatf("complement of 12 gave %b", gw));
    for (int i = 0; i < 300; i++) begin
      logic [W-1:0] ew, expect_w;
      logic c;
      ew = W'($urandom);
      c  = 1'($urandom);
      expect_w = c ? ew : W'(6'd32 - {1'b0, ew});
      iterate(ew, c, gw);
      check(gw == expect_w, $sformatf("word %b ctrl %b gave %b expected %b", ew, c, gw, expect_w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
