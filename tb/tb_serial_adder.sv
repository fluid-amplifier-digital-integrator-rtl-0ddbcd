// Testbench for serial_adder.  Words are fed least significant bit first in
// five bit times, followed by one gap period carrying READ and RESET, as the
// integrator's timing does.  Checks: the worked example 5 + 21 = 26 with its
// carry-in sequence 0,1,0,1,0 over T1..T5; then random word pairs, the serial
// sum against (a + b) mod 32, the overflow sign against a + b >= 32, and that
// the overflow pulse comes in the gap period (the sixth clock period) and
// in no other.
module tb_serial_adder;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  logic t = 0, reset_p = 0, read = 0, a = 0, b = 0;
  logic sum, sum_n, carry_in, dz_pos, dz_neg;
  int checks = 0, failures = 0;

  serial_adder dut (
    .clk(clk), .rst_n(rst_n), .t(t), .reset_p(reset_p), .read(read),
    .a(a), .b(b), .sum(sum), .sum_n(sum_n), .carry_in(carry_in),
    .dz_pos(dz_pos), .dz_neg(dz_neg)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One iteration: returns the serial sum word, the carry-in seen at each
  // bit time and the overflow pulses.
  task automatic iterate(input logic [W-1:0] aw, input logic [W-1:0] bw,
                         output logic [W-1:0] sw, output logic [W-1:0] cin,
                         output logic pos, output logic neg);
    for (int k = 0; k < W; k++) begin
      @(negedge clk);
      t = 1; read = 0; reset_p = 0; a = aw[k]; b = bw[k];
      #1;
      sw[k]  = sum;
      cin[k] = carry_in;
      check(dz_pos === 1'b0 && dz_neg === 1'b0, "overflow pulse outside READ");
    end
    @(negedge clk);
    t = 0; read = 1; reset_p = 1; a = 0; b = 0;
    #1;
    pos = dz_pos;
    neg = dz_neg;
    @(negedge clk);
    read = 0; reset_p = 0;
  endtask

  initial begin
    logic [W-1:0] sw, cin;
    logic pos, neg;
    logic [W:0] full;
    #12 rst_n = 1;

    iterate(5'd5, 5'd21, sw, cin, pos, neg);
    check(sw == 5'd26, $sformatf("5+21 gave %0d", sw));
    check(cin == 5'b01010, $sformatf("carry-in sequence %b (T5..T1)", cin));
    check(pos == 0 && neg == 1, "5+21 should give -dz");

    for (int i = 0; i < 300; i++) begin
      logic [W-1:0] aw, bw;
      aw = W'($urandom);
      bw = W'($urandom);
      full = {1'b0, aw} + {1'b0, bw};
      iterate(aw, bw, sw, cin, pos, neg);
      check(sw == full[W-1:0], $sformatf("%0d+%0d gave %0d", aw, bw, sw));
      check(pos == full[W] && neg == !full[W], $sformatf("%0d+%0d overflow %b%b", aw, bw, pos, neg));
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
