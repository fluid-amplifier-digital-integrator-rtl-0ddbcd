// End-to-end testbench for fluid_di_top at its default sizes (5-bit words,
// one gap period, integrand word 10101).  The top's own timing generator
// drives everything; the testbench only sets inputs between iterations.
//
// Experimental half integrator (word generator input 10101 = +5):
//   open-loop additions to 00000 and 11111 and subtractions from them, with
//   the printed sums and overflow signs; a preset and the clock stopped and
//   restarted with the register unchanged; then the long counter runs: 170
//   iterations (10 s at 102 pulses/s, one gap period per iteration) with dx
//   present and then absent, checked exactly against word arithmetic and
//   against the accepted band for the overflow ratio, 1.80 to 2.00.
// Complete integrator: random dx and dy checked against word arithmetic.
// Sine/cosine pair: runs throughout; its overflows are counted.
// Exponential network: preset to Z = +2, then dx present for 170 iterations
// (Z must reach +15) and absent for 170 (Z must end within +-4 of zero);
// every overflow and Z checked against word arithmetic.
// Multiplier: x = y = 0, both rising for 15 iterations (the count must then
// be near 15 x 15 / 16), then random; every count checked exactly.
// Attitude-control map: random increments; one dZ per iteration, K held,
// and integrator 6's y moving by the net of its four input lines.
// Every mechanism (each overflow sign, pass and complement, open loop,
// preset, clock stop, y up and down, both sine/cosine signs, exponential
// feedback up and down and growth to +15, counter up and down, y6 up and
// down) is counted and a
// mechanism that never happened is a failure.
module tb_fluid_di_top;
  localparam int W = 5;
  logic clk = 0, rst_n = 0, run = 0;
  logic t, t1, read, reset_p;
  logic exp_dx = 1, exp_open_loop = 0, exp_r_force = 0, exp_load = 0;
  logic [W-1:0] exp_load_word = '0;
  logic exp_y_l, exp_yc, exp_r_l, exp_r, exp_dz_pos, exp_dz_neg;
  logic [W-1:0] exp_r_contents;
  logic di_dx = 1, di_dy = 1, di_load_y = 0, di_load_r = 0;
  logic [W-1:0] di_load_y_word = '0, di_load_r_word = '0;
  logic di_y_l, di_dz_pos, di_dz_neg;
  logic [W-1:0] di_y_contents, di_r_contents;
  logic sc_dtheta = 1, sc_load = 0;
  logic [W-1:0] sc_load_cos_word = '0, sc_load_msin_word = '0;
  logic sc_dsin_pos, sc_dsin_neg, sc_dcos_pos, sc_dcos_neg;
  logic [W-1:0] sc_cos_word, sc_msin_word;
  logic ex_dx = 1, ex_load = 0;
  logic [W-1:0] ex_load_z_word = '0;
  logic ex_dz_pos, ex_dz_neg;
  logic [W-1:0] ex_z_word;
  logic mul_dx = 1, mul_dy = 1, mul_load = 0;
  logic [W-1:0] mul_load_x_word = '0, mul_load_y_word = '0;
  logic mul_ydx_pos, mul_ydx_neg, mul_xdy_pos, mul_xdy_neg;
  logic signed [15:0] mul_product;
  logic [W-1:0] mul_x_word, mul_y_word;
  logic at_d_angle_y = 1, at_d_theta_x = 1, at_d_t = 1, at_load = 0;
  logic [W-1:0] at_load_cos_y = 5'b11111, at_load_msin_y = 5'b10000;
  logic [W-1:0] at_load_cos_z = 5'b11111, at_load_msin_z = 5'b10000;
  logic [W-1:0] at_load_k = 5'b11000, at_load_y6 = 5'b10000;
  logic at_dz_pos, at_dz_neg;
  logic [3:0] at_sum_in_pos;
  logic [W-1:0] at_y6_word, at_k_word, at_cos_y_word, at_msin_y_word, at_cos_z_word, at_msin_z_word;
  int checks = 0, failures = 0;

  fluid_di_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Mechanism counters.
  typedef enum int {M_POS, M_NEG, M_PASS, M_COMPL, M_OPEN, M_PRESET, M_STOP,
                    M_YUP, M_YDOWN, M_SIN_POS, M_SIN_NEG, M_COS_POS, M_COS_NEG,
                    M_EX_UP, M_EX_DOWN, M_EX_GROW, M_MUL_UP, M_MUL_DOWN,
                    M_AT_UP, M_AT_DOWN, M_N} mech_e;
  int mech [M_N];
  string mech_name [M_N] = '{"+dz", "-dz", "pass", "complement", "open loop", "preset",
                             "clock stop", "y up", "y down", "+dsin", "-dsin", "+dcos", "-dcos",
                             "exp Z up", "exp Z down", "exp growth", "count up", "count down",
                             "y6 up", "y6 down"};

  // Sampled words of the last iteration.
  logic [W-1:0] w_yc, w_rl, w_r, w_yl;
  logic e_pos, e_neg, d_pos, d_neg;
  int exp_overflow_pulses, di_overflow_pulses;

  // Collect one iteration: from T1 to the READ period.  Inputs are changed
  // by the caller only while READ is high (the gap), right before T1.
  task automatic iteration();
    int k = 0;
    int cycles = 0;
    while (!t1) @(negedge clk);
    for (k = 0; k < W; k++) begin
      #1;
      check(t === 1'b1, "T missing in a bit time");
      w_yc[k] = exp_yc; w_rl[k] = exp_r_l; w_r[k] = exp_r; w_yl[k] = exp_y_l;
      @(negedge clk);
      cycles++;
    end
    #1;
    check(read === 1'b1 && reset_p === 1'b1, "READ/RESET not in the sixth period");
    e_pos = exp_dz_pos; e_neg = exp_dz_neg;
    d_pos = di_dz_pos;  d_neg = di_dz_neg;
    check(e_pos ^ e_neg, "experimental integrator: not exactly one overflow");
    check(d_pos ^ d_neg, "complete integrator: not exactly one overflow");
    if (e_pos || d_pos) mech[M_POS]++;
    if (e_neg || d_neg) mech[M_NEG]++;
    if (sc_dsin_pos) mech[M_SIN_POS]++;
    if (sc_dsin_neg) mech[M_SIN_NEG]++;
    if (sc_dcos_pos) mech[M_COS_POS]++;
    if (sc_dcos_neg) mech[M_COS_NEG]++;
  endtask

  int m_r, m_y, m_dr;
  logic [3:0] at_lines;
  int at_y6_prev;

  initial begin
    for (int i = 0; i < M_N; i++) mech[i] = 0;
    #12 rst_n = 1;
    @(negedge clk);
    run = 1;

    // ---- open-loop runs ----
    exp_open_loop = 1;
    mech[M_OPEN]++;
    begin
      logic [W-1:0] expect_rl [4] = '{5'b10101, 5'b10100, 5'b01011, 5'b01010};
      bit expect_pos [4] = '{0, 1, 0, 1};
      for (int run_no = 0; run_no < 4; run_no++) begin
        exp_dx = (run_no < 2);
        exp_r_force = run_no[0];
        iteration();
        check(w_yl == 5'b10101, $sformatf("word generator gave %b", w_yl));
        check(w_rl == expect_rl[run_no] && e_pos == expect_pos[run_no],
              $sformatf("open-loop run %0d: R_L %b overflow %b", run_no + 1, w_rl, e_pos));
        if (exp_dx) mech[M_PASS]++; else mech[M_COMPL]++;
      end
    end
    exp_open_loop = 0;
    exp_dx = 1;

    // ---- preset with the clock stopped, then hold ----
    // Stop in T1 of the next iteration, before any of its bits has moved.
    while (!t1) @(negedge clk);
    run = 0;
    @(negedge clk);
    exp_load = 1; exp_load_word = 5'b00000;
    di_load_y = 1; di_load_y_word = 5'b10101; di_load_r = 1; di_load_r_word = 5'b00000;
    sc_load = 1; sc_load_cos_word = 5'b11111; sc_load_msin_word = 5'b10000;
    ex_load = 1; ex_load_z_word = 5'b10010;
    mul_load = 1; mul_load_x_word = 5'b10000; mul_load_y_word = 5'b10000;
    at_load = 1;
    @(negedge clk);
    exp_load = 0; di_load_y = 0; di_load_r = 0; sc_load = 0; ex_load = 0; mul_load = 0;
    at_load = 0;
    mech[M_PRESET]++;
    repeat (30) @(negedge clk);
    check(exp_r_contents == 5'b00000 && di_y_contents == 5'b10101, "contents lost while stopped");
    mech[M_STOP]++;
    // Restart in T1; the first counter-run iteration begins here.
    run = 1;
    #1;

    // ---- long counter runs (dx present, then absent) ----
    for (int phase = 0; phase < 2; phase++) begin
      automatic int pos = 0;
      automatic int neg = 0;
      exp_dx = (phase == 0);
      ex_dx = (phase == 0);
      m_r = exp_r_contents;
      for (int it = 0; it < 170; it++) begin
        int yc, sum;
        // complete integrator inputs for this iteration (random)
        di_dx = 1'($urandom);
        di_dy = 1'($urandom);
        // multiplier: x and y both rise for the first 15 iterations, then random
        mul_dx = (it < 15 && phase == 0) ? 1'b1 : 1'($urandom);
        mul_dy = (it < 15 && phase == 0) ? 1'b1 : 1'($urandom);
        at_d_angle_y = 1'($urandom); at_d_theta_x = 1'($urandom); at_d_t = 1'($urandom);
        iteration();
        if (phase == 0 && it == 15) begin
          // the counter moves at the end of READ, so here it holds the 15
          // rising steps (x = y = +15); the registers already show step 16
          $display("multiplier after 15 steps: count %0d", mul_product);
          check(mul_product >= 13 && mul_product <= 17, "15 x 15 product count not near 14");
        end
        yc  = exp_dx ? 21 : 11;
        sum = m_r + yc;
        m_r = sum % 32;
        check(e_pos == (sum >= 32), $sformatf("counter run %0d iteration %0d", phase, it));
        // attitude map: one dZ per READ, K held, y6 moved by the net of the
        // four lines sampled at the previous READ
        check(at_dz_pos ^ at_dz_neg, "attitude map: not exactly one dZ");
        check(at_k_word == at_load_k, "attitude map: K changed");
        if (it > 0) begin
          automatic int net = 0;
          for (int i = 0; i < 4; i++) net += at_lines[i] ? 1 : -1;
          check(int'(at_y6_word) == (at_y6_prev + net + 32) % 32,
                $sformatf("attitude map: y6 %0d after %0d + %0d", at_y6_word, at_y6_prev, net));
          if (net > 0) mech[M_AT_UP]++;
          if (net < 0) mech[M_AT_DOWN]++;
        end
        at_lines = at_sum_in_pos;
        at_y6_prev = int'(at_y6_word);
        if (e_pos) pos++; else neg++;
        if (exp_dx) mech[M_PASS]++; else mech[M_COMPL]++;
      end
      $display("counter run %0d: +dz %0d  -dz %0d", phase, pos, neg);
      if (phase == 1)
        check(m_ez >= 12 && m_ez <= 20, $sformatf("exponential Z %0d did not decay with dx absent", m_ez - 16));
      if (phase == 0)
        check(pos * 100 >= neg * 180 && pos * 100 <= neg * 200, "+dz/-dz ratio outside 1.80..2.00");
      else
        check(neg * 100 >= pos * 180 && neg * 100 <= pos * 200, "-dz/+dz ratio outside 1.80..2.00");
    end

    $display("mechanisms:");
    for (int i = 0; i < M_N; i++) begin
      $display("  %-12s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Complete integrator: reference model updated at every READ, on the
  // inputs that were applied during the iteration.
  initial begin
    m_y = -1;
    forever begin
      @(negedge clk);
      if (di_load_y) m_y = int'(di_load_y_word);
      if (di_load_r) m_dr = int'(di_load_r_word);
      if (run && read && m_y >= 0) begin
        int yc, sum;
        int ny;
        ny  = (m_y + (di_dy ? 1 : 31)) % 32;
        if (di_dy) mech[M_YUP]++; else mech[M_YDOWN]++;
        yc  = di_dx ? ny : (32 - ny) % 32;
        sum = m_dr + yc;
        checks++;
        if (di_dz_pos != (sum >= 32)) begin
          failures++;
          $display("FAIL complete integrator overflow");
        end
        m_y  = ny;
        m_dr = sum % 32;
        #2;
        checks++;
        if (int'(di_y_contents) != m_y) begin
          failures++;
          $display("FAIL complete integrator y %0d expected %0d", di_y_contents, m_y);
        end
      end
    end
  end

  // Exponential network and multiplier: reference models updated at every
  // READ after their preset.
  int m_ez = -1, m_er, m_ma_y, m_ma_r, m_mb_x, m_mb_r, m_count;
  bit m_eup;
  initial begin
    forever begin
      @(negedge clk);
      if (ex_load) begin
        m_ez = int'(ex_load_z_word); m_er = 0; m_eup = 1;
      end
      if (mul_load) begin
        m_ma_y = int'(mul_load_y_word); m_mb_x = int'(mul_load_x_word);
        m_ma_r = 0; m_mb_r = 0; m_count = 0;
      end
      if (run && read && m_ez >= 0) begin
        int sum, sa, sb;
        m_ez = (m_ez + (m_eup ? 1 : 31)) % 32;
        if (m_eup) mech[M_EX_UP]++; else mech[M_EX_DOWN]++;
        if (m_ez == 31) mech[M_EX_GROW]++;
        sum = m_er + (ex_dx ? m_ez : (32 - m_ez) % 32);
        m_er = sum % 32;
        m_eup = (sum >= 32);
        checks++;
        if (ex_dz_pos != m_eup || ex_dz_neg == m_eup) begin
          failures++;
          $display("FAIL exponential overflow");
        end
        m_ma_y = (m_ma_y + (mul_dy ? 1 : 31)) % 32;
        m_mb_x = (m_mb_x + (mul_dx ? 1 : 31)) % 32;
        sa = m_ma_r + (mul_dx ? m_ma_y : (32 - m_ma_y) % 32);
        sb = m_mb_r + (mul_dy ? m_mb_x : (32 - m_mb_x) % 32);
        m_ma_r = sa % 32; m_mb_r = sb % 32;
        m_count += (sa >= 32 ? 1 : -1) + (sb >= 32 ? 1 : -1);
        if (sa >= 32 && sb >= 32) mech[M_MUL_UP]++;
        if (sa < 32 && sb < 32) mech[M_MUL_DOWN]++;
        // the counter moves at the clk edge that ends READ
        @(posedge clk);
        #1;
        checks++;
        if (int'(ex_z_word) != m_ez) begin
          failures++;
          $display("FAIL exponential Z %0d expected %0d", ex_z_word, m_ez);
        end
        checks++;
        if (int'(mul_product) != m_count || int'(mul_x_word) != m_mb_x || int'(mul_y_word) != m_ma_y) begin
          failures++;
          $display("FAIL multiplier count %0d expected %0d", mul_product, m_count);
        end
      end
    end
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
