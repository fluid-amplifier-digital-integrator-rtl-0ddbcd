// Top level: serial digital integrator system.
//
// One timing generator drives six parts that share the bit clock:
//   * the experimental half integrator (time_integrator) fed by the word
//     generator with the fixed integrand Y_WORD, with its dx, open-loop
//     test mode and register preset brought out (the configuration the design
//     built and measured);
//   * a complete digital integrator (y half and R half) with its dx and dy
//     increment inputs brought out;
//   * the sine/cosine pair of integrators driven by angle increments;
//   * the exponential network (one integrator whose output feeds its own dy);
//   * the multiplier network (two integrators and an up/down counter that
//     sums y dx + x dy);
//   * the six-integrator attitude-control map (dda_attitude).
// All overflow outputs are one-clk pulses during READ.  The electronic
// counters and analog equipment that counted overflows in the design's test
// setup are outside this top; overflow pulses are brought out for them.
//
// Timing: one iteration is WIDTH + GAP clk cycles (six by default): T1..T5
// then one period with READ and RESET.  run = 0 stops the clock.  Inputs
// dx, dy, dtheta, open_loop and r_force are sampled throughout T1..T5 and must
// be steady there; presets (load_*) should be given while the clock is
// stopped or in the gap.
module fluid_di_top #(
  parameter int unsigned      WIDTH  = di_pkg::WORD_BITS,
  parameter int unsigned      GAP    = di_pkg::GAP_SLOTS,
  parameter logic [WIDTH-1:0] Y_WORD = WIDTH'(5'b10101)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  // timing
  output logic             t,
  output logic             t1,
  output logic             read,
  output logic             reset_p,
  // experimental half integrator
  input  logic             exp_dx,
  input  logic             exp_open_loop,
  input  logic             exp_r_force,
  input  logic             exp_load,
  input  logic [WIDTH-1:0] exp_load_word,
  output logic             exp_y_l,
  output logic             exp_yc,
  output logic             exp_r_l,
  output logic             exp_r,
  output logic             exp_dz_pos,
  output logic             exp_dz_neg,
  output logic [WIDTH-1:0] exp_r_contents,
  // complete digital integrator
  input  logic             di_dx,
  input  logic             di_dy,
  input  logic             di_load_y,
  input  logic [WIDTH-1:0] di_load_y_word,
  input  logic             di_load_r,
  input  logic [WIDTH-1:0] di_load_r_word,
  output logic             di_y_l,
  output logic             di_dz_pos,
  output logic             di_dz_neg,
  output logic [WIDTH-1:0] di_y_contents,
  output logic [WIDTH-1:0] di_r_contents,
  // sine / cosine pair
  input  logic             sc_dtheta,
  input  logic             sc_load,
  input  logic [WIDTH-1:0] sc_load_cos_word,
  input  logic [WIDTH-1:0] sc_load_msin_word,
  output logic             sc_dsin_pos,
  output logic             sc_dsin_neg,
  output logic             sc_dcos_pos,
  output logic             sc_dcos_neg,
  output logic [WIDTH-1:0] sc_cos_word,
  output logic [WIDTH-1:0] sc_msin_word,
  // exponential network
  input  logic             ex_dx,
  input  logic             ex_load,
  input  logic [WIDTH-1:0] ex_load_z_word,
  output logic             ex_dz_pos,
  output logic             ex_dz_neg,
  output logic [WIDTH-1:0] ex_z_word,
  // multiplier network
  input  logic             mul_dx,
  input  logic             mul_dy,
  input  logic             mul_load,
  input  logic [WIDTH-1:0] mul_load_x_word,
  input  logic [WIDTH-1:0] mul_load_y_word,
  output logic             mul_ydx_pos,
  output logic             mul_ydx_neg,
  output logic             mul_xdy_pos,
  output logic             mul_xdy_neg,
  output logic signed [15:0] mul_product,
  output logic [WIDTH-1:0] mul_x_word,
  output logic [WIDTH-1:0] mul_y_word,
  // attitude-control map
  input  logic             at_d_angle_y,
  input  logic             at_d_theta_x,
  input  logic             at_d_t,
  input  logic             at_load,
  input  logic [WIDTH-1:0] at_load_cos_y,
  input  logic [WIDTH-1:0] at_load_msin_y,
  input  logic [WIDTH-1:0] at_load_cos_z,
  input  logic [WIDTH-1:0] at_load_msin_z,
  input  logic [WIDTH-1:0] at_load_k,
  input  logic [WIDTH-1:0] at_load_y6,
  output logic             at_dz_pos,
  output logic             at_dz_neg,
  output logic [3:0]       at_sum_in_pos,
  output logic [WIDTH-1:0] at_y6_word,
  output logic [WIDTH-1:0] at_k_word,
  output logic [WIDTH-1:0] at_cos_y_word,
  output logic [WIDTH-1:0] at_msin_y_word,
  output logic [WIDTH-1:0] at_cos_z_word,
  output logic [WIDTH-1:0] at_msin_z_word
);
  logic [$clog2(WIDTH+GAP)-1:0] bit_idx;
  logic exp_y_l_n;

  timing_generator #(.WIDTH(WIDTH), .GAP(GAP)) u_timing (
    .clk(clk), .rst_n(rst_n), .run(run),
    .t(t), .t1(t1), .read(read), .reset_p(reset_p), .bit_idx(bit_idx)
  );

  word_generator #(.WIDTH(WIDTH), .WORD(Y_WORD)) u_word (
    .clk(clk), .rst_n(rst_n), .t(t), .y_l(exp_y_l), .y_l_n(exp_y_l_n)
  );

  time_integrator #(.WIDTH(WIDTH)) u_exp (
    .clk(clk), .rst_n(rst_n), .t(t), .reset_p(reset_p), .read(read),
    .y_in(exp_y_l), .dx(exp_dx), .open_loop(exp_open_loop), .r_force(exp_r_force),
    .load(exp_load), .load_word(exp_load_word),
    .yc(exp_yc), .r_l(exp_r_l), .r_out(exp_r),
    .dz_pos(exp_dz_pos), .dz_neg(exp_dz_neg), .r_contents(exp_r_contents)
  );

  digital_integrator #(.WIDTH(WIDTH)) u_di (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dx(di_dx), .dy(di_dy),
    .load_y(di_load_y), .load_y_word(di_load_y_word),
    .load_r(di_load_r), .load_r_word(di_load_r_word),
    .y_l(di_y_l), .dz_pos(di_dz_pos), .dz_neg(di_dz_neg),
    .y_contents(di_y_contents), .r_contents(di_r_contents)
  );

  dda_sincos #(.WIDTH(WIDTH)) u_sc (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dtheta(sc_dtheta), .load(sc_load),
    .load_cos_word(sc_load_cos_word), .load_msin_word(sc_load_msin_word),
    .dsin_pos(sc_dsin_pos), .dsin_neg(sc_dsin_neg),
    .dcos_pos(sc_dcos_pos), .dcos_neg(sc_dcos_neg),
    .cos_word(sc_cos_word), .msin_word(sc_msin_word)
  );

  dda_exp #(.WIDTH(WIDTH)) u_ex (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dx(ex_dx), .load(ex_load), .load_z_word(ex_load_z_word),
    .dz_pos(ex_dz_pos), .dz_neg(ex_dz_neg), .z_word(ex_z_word)
  );

  dda_multiplier #(.WIDTH(WIDTH), .COUNT_BITS(16)) u_mul (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dx(mul_dx), .dy(mul_dy), .load(mul_load),
    .load_x_word(mul_load_x_word), .load_y_word(mul_load_y_word),
    .ydx_pos(mul_ydx_pos), .ydx_neg(mul_ydx_neg),
    .xdy_pos(mul_xdy_pos), .xdy_neg(mul_xdy_neg),
    .product(mul_product), .x_word(mul_x_word), .y_word(mul_y_word)
  );

  dda_attitude #(.WIDTH(WIDTH)) u_at (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .d_angle_y(at_d_angle_y), .d_theta_x(at_d_theta_x), .d_t(at_d_t),
    .load(at_load),
    .load_cos_y(at_load_cos_y), .load_msin_y(at_load_msin_y),
    .load_cos_z(at_load_cos_z), .load_msin_z(at_load_msin_z),
    .load_k(at_load_k), .load_y6(at_load_y6),
    .dz_pos(at_dz_pos), .dz_neg(at_dz_neg), .sum_in_pos(at_sum_in_pos),
    .y6_word(at_y6_word), .k_word(at_k_word),
    .cos_y_word(at_cos_y_word), .msin_y_word(at_msin_y_word),
    .cos_z_word(at_cos_z_word), .msin_z_word(at_msin_z_word)
  );
endmodule
