// Testbench for dda_sincos.
//
// Reference: word arithmetic for the two integrators and the two sign
// latches, written independently of the serial circuit.  S has y = cos and
// dy = sign of the last dcos; C has y = -sin and dy = inverse of the sign of
// the last dsin; both add y for +dtheta and 32 - y for -dtheta; the overflow
// is + when the sum reaches 32.  Starting from cos = 11111 (+15), -sin =
// 10000 (0) and dtheta always present, every overflow, both y registers and
// their serial timing are compared for 640 iterations.  The loop must also
// actually turn: the cos register must be seen both above and below zero and
// both outputs must give overflows of both signs.
module tb_dda_sincos;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  logic t = 0, t1 = 0, reset_p = 0, read = 0, dtheta = 1, load = 0;
  logic [W-1:0] load_cos_word = '0, load_msin_word = '0;
  logic dsin_pos, dsin_neg, dcos_pos, dcos_neg;
  logic [W-1:0] cos_word, msin_word;
  int checks = 0, failures = 0;

  dda_sincos #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dtheta(dtheta), .load(load),
    .load_cos_word(load_cos_word), .load_msin_word(load_msin_word),
    .dsin_pos(dsin_pos), .dsin_neg(dsin_neg), .dcos_pos(dcos_pos), .dcos_neg(dcos_neg),
    .cos_word(cos_word), .msin_word(msin_word)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Model state.
  int s_y, s_r, c_y, c_r;
  bit sin_up, cos_up;

  initial begin
    int cos_hi = 0, cos_lo = 0, sp = 0, sn = 0, cp = 0, cn = 0;
    #12 rst_n = 1;
    sin_up = 1; cos_up = 1;
    @(negedge clk);
    load = 1; load_cos_word = 5'b11111; load_msin_word = 5'b10000;
    @(negedge clk);
    load = 0;
    s_y = 31; s_r = 0; c_y = 16; c_r = 0;

    for (int it = 0; it < 640; it++) begin
      int s_sum, c_sum;
      bit s_ovf, c_ovf;
      for (int k = 0; k < W; k++) begin
        @(negedge clk);
        t = 1; t1 = (k == 0); read = 0; reset_p = 0;
        #1;
        check(!(dsin_pos || dsin_neg || dcos_pos || dcos_neg), "overflow outside READ");
      end
      @(negedge clk);
      t = 0; t1 = 0; read = 1; reset_p = 1;
      #1;
      // Reference iteration.
      s_y = (s_y + (cos_up ? 1 : 31)) % 32;
      c_y = (c_y + (!sin_up ? 1 : 31)) % 32;
      s_sum = s_r + (dtheta ? s_y : (32 - s_y) % 32);
      c_sum = c_r + (dtheta ? c_y : (32 - c_y) % 32);
      s_r = s_sum % 32; c_r = c_sum % 32;
      s_ovf = s_sum >= 32; c_ovf = c_sum >= 32;
      sin_up = s_ovf; cos_up = c_ovf;
      check(dsin_pos == s_ovf && dsin_neg == !s_ovf, $sformatf("dsin at iteration %0d", it));
      check(dcos_pos == c_ovf && dcos_neg == !c_ovf, $sformatf("dcos at iteration %0d", it));
      if (s_ovf) sp++; else sn++;
      if (c_ovf) cp++; else cn++;
      @(posedge clk);
      #1;
      check(int'(cos_word) == s_y && int'(msin_word) == c_y,
            $sformatf("iteration %0d: cos %0d -sin %0d expected %0d %0d", it, cos_word, msin_word, s_y, c_y));
      if (s_y > 16) cos_hi++;
      if (s_y < 16) cos_lo++;
    end
    $display("cos above zero %0d, below zero %0d; dsin +%0d -%0d; dcos +%0d -%0d",
             cos_hi, cos_lo, sp, sn, cp, cn);
    check(cos_hi > 0 && cos_lo > 0, "cos register never changed sign");
    check(sp > 0 && sn > 0 && cp > 0 && cn > 0, "an overflow sign never occurred");
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
