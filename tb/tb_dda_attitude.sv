// Testbench for dda_attitude, the six-integrator attitude-control map.
// A word-level reference, written from the map's connections and the
// integrator's arithmetic (Z <- y +- 1, R <- R +- y, overflow when the sum
// reaches 32), is stepped once per iteration with the same random increments
// dy, d(theta x) and dt.  Every READ compares dZ and the four lines into
// integrator 6; after every iteration all six y registers are compared.
// Behaviour: K must never change, and integrator 6's y must be seen to move
// by each net amount -4, -2, 0, +2 and +4 (a missing one is a failure).
module tb_dda_attitude;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  logic t = 0, t1 = 0, reset_p = 0, read = 0;
  logic d_angle_y = 1, d_theta_x = 1, d_t = 1, load = 0;
  logic [W-1:0] load_cos_y, load_msin_y, load_cos_z, load_msin_z, load_k, load_y6;
  logic dz_pos, dz_neg;
  logic [3:0] sum_in_pos;
  logic [W-1:0] y6_word, k_word, cos_y_word, msin_y_word, cos_z_word, msin_z_word;
  int checks = 0, failures = 0;

  dda_attitude #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Reference state.  A sine/cosine pair: S holds cos, C holds -sin.
  typedef struct {
    int ys, rs, yc, rc;
    bit sin_up, cos_up;
    bit dsin, dcos;
  } pair_t;
  pair_t py, pz;
  int k, rk, y6, r6, inc;
  bit z_up;
  int seen_net [5];

  function automatic int add(input int a, input int b);
    return (a + b) % 32;
  endfunction

  function automatic int signed_term(input int y, input bit up);
    return up ? y : (32 - y) % 32;
  endfunction

  task automatic pair_step(inout pair_t p, input bit dtheta);
    int sum;
    p.ys = add(p.ys, p.cos_up ? 1 : 31);
    sum  = p.rs + signed_term(p.ys, dtheta);
    p.rs = sum % 32; p.dsin = (sum >= 32);
    p.yc = add(p.yc, !p.sin_up ? 1 : 31);
    sum  = p.rc + signed_term(p.yc, dtheta);
    p.rc = sum % 32; p.dcos = (sum >= 32);
    p.sin_up = p.dsin; p.cos_up = p.dcos;
  endtask

  task automatic iterate(input bit ay, input bit tx, input bit dtv);
    int sum, net;
    bit dk, dz;
    logic [3:0] lines;
    for (int b = 0; b < W; b++) begin
      @(negedge clk);
      t = 1; t1 = (b == 0); read = 0; reset_p = 0;
      d_angle_y = ay; d_theta_x = tx; d_t = dtv;
    end
    @(negedge clk);
    t = 0; t1 = 0; read = 1; reset_p = 1;
    #1;
    pair_step(py, ay);
    pair_step(pz, z_up);
    sum = rk + signed_term(k, tx);
    rk = sum % 32; dk = (sum >= 32);
    y6 = add(y6, inc);
    sum = r6 + signed_term(y6, dtv);
    r6 = sum % 32; dz = (sum >= 32);
    lines = {dz, dk, pz.dsin, py.dcos};
    net = 0;
    for (int i = 0; i < 4; i++) net += lines[i] ? 1 : -1;
    inc = (net + 32) % 32;
    z_up = dz;
    check(dz_pos == dz && dz_neg == !dz, "dZ");
    check(sum_in_pos == lines, $sformatf("lines into y6 %b expected %b", sum_in_pos, lines));
    @(posedge clk);
    #1;
    check(int'(y6_word) == y6, $sformatf("y6 %0d expected %0d", y6_word, y6));
    check(int'(k_word) == k, "K changed");
    check(int'(cos_y_word) == py.ys && int'(msin_y_word) == py.yc, "pair y registers");
    check(int'(cos_z_word) == pz.ys && int'(msin_z_word) == pz.yc, "pair Z registers");
  endtask

  initial begin
    int prev_y6;
    for (int i = 0; i < 5; i++) seen_net[i] = 0;
    load_cos_y = 5'b11111; load_msin_y = 5'b10000;   // y = 0: cos +15, -sin 0
    load_cos_z = 5'b11111; load_msin_z = 5'b10000;
    load_k = 5'b11000;                               // K = +8
    load_y6 = 5'b10000;
    #12 rst_n = 1;
    @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
    py = '{ys: 31, rs: 0, yc: 16, rc: 0, sin_up: 1, cos_up: 1, dsin: 0, dcos: 0};
    pz = py;
    k = 24; rk = 0; y6 = 16; r6 = 0; inc = 0; z_up = 1;
    for (int it = 0; it < 600; it++) begin
      prev_y6 = y6;
      iterate(1'($urandom), 1'($urandom), 1'($urandom));
      for (int n = -4; n <= 4; n += 2)
        if ((prev_y6 + n + 32) % 32 == y6) seen_net[(n + 4) / 2]++;
    end
    for (int i = 0; i < 5; i++) begin
      $display("y6 moved by %0d: %0d times", 2 * i - 4, seen_net[i]);
      check(seen_net[i] > 0, "a net increment of y6 never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
