// Testbench for digital_integrator (y half and R half together).
//
// The reference is word arithmetic, independent of the serial circuit: each
// iteration y <- (y + 1) mod 32 for +dy and (y - 1) mod 32 for -dy; the R half
// adds y when dx is present and 32 - y (the two's complement) when absent;
// the overflow is +dz when that sum reaches 32 and -dz otherwise, and
// R <- sum mod 32.  Checked: the serial Y_L word, both registers and the
// overflow sign every iteration, and that the overflow comes in the sixth
// clock period only.  Phases: random dx and dy; dy alternating (y held
// constant, as the design does to keep a variable fixed) with dx present,
// where the net overflow must track the integral of the held value; presets.
module tb_digital_integrator;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  logic t = 0, t1 = 0, reset_p = 0, read = 0, dx = 1, dy = 1;
  logic load_y = 0, load_r = 0;
  logic [W-1:0] load_y_word = '0, load_r_word = '0;
  logic y_l, dz_pos, dz_neg;
  logic [W-1:0] y_contents, r_contents;
  int checks = 0, failures = 0;
  int m_y = 0, m_r = 0;   // model registers (raw words)

  digital_integrator #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dx(dx), .dy(dy), .load_y(load_y), .load_y_word(load_y_word),
    .load_r(load_r), .load_r_word(load_r_word),
    .y_l(y_l), .dz_pos(dz_pos), .dz_neg(dz_neg),
    .y_contents(y_contents), .r_contents(r_contents)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One iteration; returns +1 for +dz, -1 for -dz.
  task automatic iterate(input logic dxv, input logic dyv, output int dz);
    logic [W-1:0] yl_w;
    int early = 0, sum, yc;
    for (int k = 0; k < W; k++) begin
      @(negedge clk);
      t = 1; t1 = (k == 0); read = 0; reset_p = 0; dx = dxv; dy = dyv;
      load_y = 0; load_r = 0;
      #1;
      yl_w[k] = y_l;
      if (dz_pos || dz_neg) early++;
    end
    @(negedge clk);
    t = 0; t1 = 0; read = 1; reset_p = 1;
    #1;
    dz = dz_pos ? 1 : -1;
    // Reference.
    m_y = (m_y + (dyv ? 1 : 31)) % 32;
    yc  = dxv ? m_y : (32 - m_y) % 32;
    sum = m_r + yc;
    m_r = sum % 32;
    check(early == 0 && (dz_pos ^ dz_neg), "overflow timing");
    check(int'(yl_w) == m_y, $sformatf("Y_L %0d expected %0d", yl_w, m_y));
    check((dz == 1) == (sum >= 32), $sformatf("overflow %0d, sum %0d", dz, sum));
    @(posedge clk);
    #1;
    check(int'(y_contents) == m_y && int'(r_contents) == m_r,
          $sformatf("registers y=%0d r=%0d expected %0d %0d", y_contents, r_contents, m_y, m_r));
  endtask

  initial begin
    int dz, net;
    #12 rst_n = 1;

    for (int i = 0; i < 1000; i++) iterate(1'($urandom), 1'($urandom), dz);

    // Preset y = 10101 (+5) and R = 0, hold y by alternating dy.
    @(negedge clk);
    read = 0; reset_p = 0;
    load_y = 1; load_y_word = 5'b10101; load_r = 1; load_r_word = '0;
    @(negedge clk);
    load_y = 0; load_r = 0;
    m_y = 21; m_r = 0;
    net = 0;
    for (int i = 0; i < 320; i++) begin
      iterate(1'b1, 1'(i % 2), dz);   // y alternates 20, 21
      net += dz;
    end
    // Held values 20 and 21 are +4 and +5 biased: integral 320 * 4.5 = 1440,
    // i.e. 90 net overflows of 16, within one overflow of remainder.
    check(net >= 89 && net <= 91, $sformatf("net overflow %0d for held y", net));

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
