// Testbench for dda_exp.  A word-level reference (independent of the serial
// circuit) follows the loop: Z <- Z +- 1 by the sign of the last overflow,
// R <- R + Z (dx present) or R + 32 - Z (dx absent), overflow when the sum
// reaches 32.  Every overflow and the Z register are compared for 200
// iterations.  Behaviour: from Z = +2 with dx present, Z must grow to the
// largest value, +15, within 60 iterations (growth in proportion to Z); then
// from Z = +12 with dx absent, Z must decay and stay within +-4 of zero over
// the last 50 of 100 iterations.
module tb_dda_exp;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  logic t = 0, t1 = 0, reset_p = 0, read = 0, dx = 1, load = 0;
  logic [W-1:0] load_z_word = '0;
  logic dz_pos, dz_neg;
  logic [W-1:0] z_word;
  int checks = 0, failures = 0;
  int m_z, m_r;
  bit m_up;

  dda_exp #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dx(dx), .load(load), .load_z_word(load_z_word),
    .dz_pos(dz_pos), .dz_neg(dz_neg), .z_word(z_word)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic preset(input logic [W-1:0] w);
    @(negedge clk);
    t = 0; t1 = 0; read = 0; reset_p = 0;
    load = 1; load_z_word = w;
    @(negedge clk);
    load = 0;
    m_z = int'(w); m_r = 0; m_up = 1;
  endtask

  task automatic iterate(input logic dxv);
    int sum;
    for (int k = 0; k < W; k++) begin
      @(negedge clk);
      t = 1; t1 = (k == 0); read = 0; reset_p = 0; dx = dxv;
    end
    @(negedge clk);
    t = 0; t1 = 0; read = 1; reset_p = 1;
    #1;
    m_z = (m_z + (m_up ? 1 : 31)) % 32;
    sum = m_r + (dxv ? m_z : (32 - m_z) % 32);
    m_r = sum % 32;
    m_up = (sum >= 32);
    check(dz_pos == m_up && dz_neg == !m_up, "overflow");
    @(posedge clk);
    #1;
    check(int'(z_word) == m_z, $sformatf("Z %0d expected %0d", z_word, m_z));
  endtask

  initial begin
    int reached = -1, max_late = 0;
    m_up = 1;
    #12 rst_n = 1;
    preset(5'd18);   // +2
    for (int i = 0; i < 100; i++) begin
      iterate(1'b1);
      if (reached < 0 && m_z == 31) reached = i;
      if (reached >= 0) break;
    end
    $display("Z reached +15 after %0d iterations", reached + 1);
    check(reached >= 0 && reached < 60, "no growth to +15");
    preset(5'd28);   // +12
    for (int i = 0; i < 100; i++) begin
      iterate(1'b0);
      if (i >= 50 && (m_z - 16 > max_late || 16 - m_z > max_late))
        max_late = (m_z > 16) ? m_z - 16 : 16 - m_z;
    end
    $display("largest |Z| in the last 50 iterations with dx absent: %0d", max_late);
    check(max_late <= 4, "no decay with dx absent");
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
