// Testbench for dda_multiplier.  Reference: word arithmetic for both
// integrators (y half then R half, as in tb_digital_integrator) and the
// counter, compared every iteration for 600 iterations of random dx and dy.
// Behaviour: from x = y = 0 with dx and dy both present for 15 iterations,
// x and y reach +15 and the counter must be near x*y/16 = 14 (each count is
// 16 units; the discrete product rule adds one unit per iteration, so 13..17
// is accepted).
module tb_dda_multiplier;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  logic t = 0, t1 = 0, reset_p = 0, read = 0, dx = 1, dy = 1, load = 0;
  logic [W-1:0] load_x_word = '0, load_y_word = '0;
  logic ydx_pos, ydx_neg, xdy_pos, xdy_neg;
  logic signed [15:0] product;
  logic [W-1:0] x_word, y_word;
  int checks = 0, failures = 0;
  int m_x, m_y, m_ra, m_rb, m_count;

  dda_multiplier #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dx(dx), .dy(dy), .load(load), .load_x_word(load_x_word), .load_y_word(load_y_word),
    .ydx_pos(ydx_pos), .ydx_neg(ydx_neg), .xdy_pos(xdy_pos), .xdy_neg(xdy_neg),
    .product(product), .x_word(x_word), .y_word(y_word)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic preset(input logic [W-1:0] xw, input logic [W-1:0] yw);
    @(negedge clk);
    t = 0; t1 = 0; read = 0; reset_p = 0;
    load = 1; load_x_word = xw; load_y_word = yw;
    @(negedge clk);
    load = 0;
    m_x = int'(xw); m_y = int'(yw); m_ra = 0; m_rb = 0; m_count = 0;
  endtask

  task automatic iterate(input logic dxv, input logic dyv);
    int sa, sb;
    for (int k = 0; k < W; k++) begin
      @(negedge clk);
      t = 1; t1 = (k == 0); read = 0; reset_p = 0; dx = dxv; dy = dyv;
    end
    @(negedge clk);
    t = 0; t1 = 0; read = 1; reset_p = 1;
    #1;
    m_y = (m_y + (dyv ? 1 : 31)) % 32;
    m_x = (m_x + (dxv ? 1 : 31)) % 32;
    sa = m_ra + (dxv ? m_y : (32 - m_y) % 32);
    sb = m_rb + (dyv ? m_x : (32 - m_x) % 32);
    m_ra = sa % 32; m_rb = sb % 32;
    m_count += (sa >= 32 ? 1 : -1) + (sb >= 32 ? 1 : -1);
    check(ydx_pos == (sa >= 32) && ydx_neg == (sa < 32), "y dx overflow");
    check(xdy_pos == (sb >= 32) && xdy_neg == (sb < 32), "x dy overflow");
    @(posedge clk);
    #1;
    check(int'(product) == m_count, $sformatf("product count %0d expected %0d", product, m_count));
    check(int'(x_word) == m_x && int'(y_word) == m_y, "x / y registers");
  endtask

  initial begin
    #12 rst_n = 1;
    preset(5'b10000, 5'b10000);
    for (int i = 0; i < 15; i++) iterate(1'b1, 1'b1);
    $display("x=%0d y=%0d count=%0d", m_x - 16, m_y - 16, product);
    check(product >= 13 && product <= 17, "product of 15 x 15 not near 14 counts");
    preset(5'b10011, 5'b01110);
    for (int i = 0; i < 600; i++) iterate(1'($urandom), 1'($urandom));
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
