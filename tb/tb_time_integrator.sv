// Testbench for time_integrator (one half of the digital integrator).
//
// Iterations are driven as five bit times then one gap period with READ and
// RESET.  Expected values come from the design's worked arithmetic and its
// printed simulation tables, not from the block:
//   * open-loop runs with Y_L = 10101: +dx and R = 00000 gives 10101 and -dz;
//     +dx and R = 11111 gives 10100 and +dz; -dx and R = 00000 gives 01011 and
//     -dz; -dx and R = 11111 gives 01010 and +dz; the register output is the
//     adder output one iteration later;
//   * closed loop with zero input: a preset number circulates, -dz each time;
//   * closed loop, R preset to 10001, +dx: R_L = 00110 (+dz), 11011 (-dz),
//     10000 (+dz); R preset to 01010, -dx: 10101 (-dz), 00000 (+dz), 01011 (-dz);
//   * constant integrands 13, 5, 0, -5, -16 (raw 11101, 10101, 10000, 01011,
//     00000) from a cleared register: the positive-overflow counts of the first
//     20 iterations and the counts at iterations 160, 500 and 1000 as printed.
// Every iteration must give exactly one overflow pulse, in its sixth clock
// period.
module tb_time_integrator;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  logic t = 0, reset_p = 0, read = 0, y_in = 0, dx = 1;
  logic open_loop = 0, r_force = 0, load = 0;
  logic [W-1:0] load_word = '0;
  logic yc, r_l, r_out, dz_pos, dz_neg;
  logic [W-1:0] r_contents;
  int checks = 0, failures = 0;

  time_integrator #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .t(t), .reset_p(reset_p), .read(read),
    .y_in(y_in), .dx(dx), .open_loop(open_loop), .r_force(r_force),
    .load(load), .load_word(load_word),
    .yc(yc), .r_l(r_l), .r_out(r_out), .dz_pos(dz_pos), .dz_neg(dz_neg),
    .r_contents(r_contents)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [W-1:0] last_rl, last_yc, last_r;
  logic last_pos, last_neg;

  task automatic iterate(input logic [W-1:0] yw, input logic dxv);
    int pulses = 0;
    for (int k = 0; k < W; k++) begin
      @(negedge clk);
      t = 1; read = 0; reset_p = 0; y_in = yw[k]; dx = dxv;
      #1;
      last_rl[k] = r_l;
      last_yc[k] = yc;
      last_r[k]  = r_out;
      if (dz_pos || dz_neg) pulses++;
    end
    @(negedge clk);
    t = 0; read = 1; reset_p = 1; y_in = 0;
    #1;
    last_pos = dz_pos;
    last_neg = dz_neg;
    checks++;
    if (pulses != 0 || (last_pos ^ last_neg) != 1'b1) begin
      failures++;
      $display("FAIL overflow timing: %0d early pulses, read gave %b%b", pulses, last_pos, last_neg);
    end
  endtask

  task automatic preset(input logic [W-1:0] w);
    @(negedge clk);
    read = 0; reset_p = 0; t = 0;
    load = 1; load_word = w;
    @(negedge clk);
    load = 0;
  endtask

  // Printed positive-overflow counts, iterations 1..20, per integrand.
  int pos20 [5][20] = '{
    '{0,1,2,3,4,5,6,7,8,9,9,10,11,12,13,14,15,16,17,18},  // 13
    '{0,1,1,2,3,3,4,5,5,6,7,7,8,9,9,10,11,11,12,13},      // 5
    '{0,1,1,2,2,3,3,4,4,5,5,6,6,7,7,8,8,9,9,10},          // 0
    '{0,0,1,1,1,2,2,2,3,3,3,4,4,4,5,5,5,6,6,6},           // -5
    '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0}            // -16
  };
  // Printed positive counts at iterations 160, 500, 1000.
  int pos_late [5][3] = '{
    '{145, 453, 906}, '{105, 328, 656}, '{80, 250, 500}, '{55, 171, 343}, '{0, 0, 0}
  };
  logic [W-1:0] raw_y [5] = '{5'b11101, 5'b10101, 5'b10000, 5'b01011, 5'b00000};

  initial begin
    #12 rst_n = 1;

    // Open loop (Runs 1-4).
    open_loop = 1;
    r_force = 0; iterate(5'b10101, 1);
    check(last_rl == 5'b10101 && last_neg, $sformatf("run1 R_L %b", last_rl));
    r_force = 1; iterate(5'b10101, 1);
    check(last_rl == 5'b10100 && last_pos, $sformatf("run2 R_L %b", last_rl));
    check(last_r == 5'b10101, $sformatf("run2 register output %b (run1 sum)", last_r));
    r_force = 0; iterate(5'b10101, 0);
    check(last_yc == 5'b01011, $sformatf("run3 Y_C %b", last_yc));
    check(last_rl == 5'b01011 && last_neg, $sformatf("run3 R_L %b", last_rl));
    check(last_r == 5'b10100, $sformatf("run3 register output %b (run2 sum)", last_r));
    r_force = 1; iterate(5'b10101, 0);
    check(last_rl == 5'b01010 && last_pos, $sformatf("run4 R_L %b", last_rl));
    check(r_contents == 5'b01010, $sformatf("run4 register contents %b", r_contents));
    open_loop = 0;

    // Closed loop, zero input: stored number circulates (Run 5).
    preset(5'b11101);
    for (int i = 0; i < 4; i++) begin
      iterate(5'b00000, 1);
      check(last_rl == 5'b11101 && last_neg, $sformatf("run5 R_L %b", last_rl));
    end

    // Run 7.
    preset(5'b10001);
    iterate(5'b10101, 1);
    check(last_rl == 5'b00110 && last_pos, $sformatf("run7 it1 R_L %b", last_rl));
    iterate(5'b10101, 1);
    check(last_rl == 5'b11011 && last_neg, $sformatf("run7 it2 R_L %b", last_rl));
    iterate(5'b10101, 1);
    check(last_rl == 5'b10000 && last_pos, $sformatf("run7 it3 R_L %b", last_rl));

    // Run 9.
    preset(5'b01010);
    iterate(5'b10101, 0);
    check(last_yc == 5'b01011, "run9 Y_C");
    check(last_rl == 5'b10101 && last_neg, $sformatf("run9 it1 R_L %b", last_rl));
    iterate(5'b10101, 0);
    check(last_rl == 5'b00000 && last_pos, $sformatf("run9 it2 R_L %b", last_rl));
    iterate(5'b10101, 0);
    check(last_rl == 5'b01011 && last_neg, $sformatf("run9 it3 R_L %b", last_rl));

    // Simulation tables: constant integrand from a cleared register.
    for (int tbl = 0; tbl < 5; tbl++) begin
      automatic int pos = 0;
      automatic int neg = 0;
      preset(5'b00000);
      for (int n = 1; n <= 1000; n++) begin
        iterate(raw_y[tbl], 1);
        if (last_pos) pos++;
        if (last_neg) neg++;
        if (n <= 20)
          check(pos == pos20[tbl][n-1] && neg == n - pos20[tbl][n-1],
                $sformatf("table %0d iteration %0d: +%0d -%0d", tbl, n, pos, neg));
        if (n == 160 || n == 500 || n == 1000) begin
          automatic int idx = (n == 160) ? 0 : (n == 500) ? 1 : 2;
          check(pos == pos_late[tbl][idx] && neg == n - pos_late[tbl][idx],
                $sformatf("table %0d iteration %0d: +%0d -%0d", tbl, n, pos, neg));
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
