// Attitude-control integrator map: six digital integrators that mechanise
// one satellite attitude-control equation, with output increments dZ.
//
// The interconnection is the design's:
//   * integrators 1 and 2 are a sine/cosine pair driven by the angle
//     increments dy of one transducer (dda_sincos): they give d(sin y) and
//     d(cos y);
//   * integrators 4 and 5 are a second pair driven by the network's own
//     output dZ: they give d(sin Z) and d(cos Z);
//   * integrator 3 multiplies by a constant: K is preset into its y register,
//     which then only recirculates (y never changes), and it integrates K
//     over the second transducer's increments d(theta x);
//   * integrator 6 integrates over time (dx = dt).  Its y register sums four
//     increment lines, d(cos y), d(sin Z), d(K theta x) and its own output
//     dZ, which closes the loop that performs the division implicitly.
//
// This implementation's choices: each increment is a sign taken at READ, as
// in the other networks (latches reset to +).  The four lines into
// integrator 6 are added in one step per iteration: their net (-4, -2, 0, +2
// or +4) is formed as a two's-complement word at READ and sent serially
// through integrator 6's y adder in the next iteration, so y6 changes by that
// amount.  Before the first READ the net word is zero.  load presets all y
// registers, clears the remainders, sets the dZ latch to + and clears the
// net word.  Words wrap modulo 2^WIDTH like every register of the cell.
//
// Timing: as digital_integrator.  d_angle_y, d_theta_x and d_t must be
// steady from T1 to T5; dz_pos/dz_neg and sum_in_pos are valid during READ.
module dda_attitude #(
  parameter int unsigned WIDTH = di_pkg::WORD_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             t,
  input  logic             t1,
  input  logic             reset_p,
  input  logic             read,
  input  logic             d_angle_y,    // transducer increment dy (1: +)
  input  logic             d_theta_x,    // transducer increment d(theta x)
  input  logic             d_t,          // time increment dt of integrator 6
  input  logic             load,
  input  logic [WIDTH-1:0] load_cos_y,   // integrator 1 y: cos y
  input  logic [WIDTH-1:0] load_msin_y,  // integrator 2 y: -sin y
  input  logic [WIDTH-1:0] load_cos_z,   // integrator 4 y: cos Z
  input  logic [WIDTH-1:0] load_msin_z,  // integrator 5 y: -sin Z
  input  logic [WIDTH-1:0] load_k,       // integrator 3 y: constant K
  input  logic [WIDTH-1:0] load_y6,      // integrator 6 y
  output logic             dz_pos,       // output increment dZ
  output logic             dz_neg,
  output logic [3:0]       sum_in_pos,   // lines into y6: {dZ, dK, dsinZ, dcosy}
  output logic [WIDTH-1:0] y6_word,
  output logic [WIDTH-1:0] k_word,
  output logic [WIDTH-1:0] cos_y_word,
  output logic [WIDTH-1:0] msin_y_word,
  output logic [WIDTH-1:0] cos_z_word,
  output logic [WIDTH-1:0] msin_z_word
);
  localparam logic [WIDTH-1:0] PLUS  = WIDTH'(1);
  localparam logic [WIDTH-1:0] MINUS = '1;

  logic z_up;                         // sign of the last dZ, dx of 4 and 5
  logic dsin_y_pos, dsin_y_neg, dcos_y_pos, dcos_y_neg;
  logic dsin_z_pos, dsin_z_neg, dcos_z_pos, dcos_z_neg;
  logic dk_pos, dk_neg;
  logic [WIDTH-1:0] net, inc_word;
  logic k_dout, k_dout_n, k_yc, k_rl, k_r;
  logic [WIDTH-1:0] k_r_word;
  logic y6_yc, y6_l, y6_r, y6_dz_pos, y6_dz_neg;
  logic r6_yc, r6_rl, r6_r;
  logic [WIDTH-1:0] r6_word;

  // Integrators 1 and 2.
  dda_sincos #(.WIDTH(WIDTH)) u_pair_y (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dtheta(d_angle_y), .load(load),
    .load_cos_word(load_cos_y), .load_msin_word(load_msin_y),
    .dsin_pos(dsin_y_pos), .dsin_neg(dsin_y_neg),
    .dcos_pos(dcos_y_pos), .dcos_neg(dcos_y_neg),
    .cos_word(cos_y_word), .msin_word(msin_y_word)
  );

  // Integrators 4 and 5, driven by the output dZ.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    z_up <= 1'b1;
    else if (load) z_up <= 1'b1;
    else if (read) z_up <= dz_pos;
  end

  dda_sincos #(.WIDTH(WIDTH)) u_pair_z (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dtheta(z_up), .load(load),
    .load_cos_word(load_cos_z), .load_msin_word(load_msin_z),
    .dsin_pos(dsin_z_pos), .dsin_neg(dsin_z_neg),
    .dcos_pos(dcos_z_pos), .dcos_neg(dcos_z_neg),
    .cos_word(cos_z_word), .msin_word(msin_z_word)
  );

  // Integrator 3: y register recirculates the constant K unchanged.
  shift_register #(.WIDTH(WIDTH)) u_k_reg (
    .clk(clk), .rst_n(rst_n), .t(t), .din(k_dout),
    .load(load), .load_word(load_k),
    .dout(k_dout), .dout_n(k_dout_n), .contents(k_word)
  );

  time_integrator #(.WIDTH(WIDTH)) u_k_half (
    .clk(clk), .rst_n(rst_n), .t(t), .reset_p(reset_p), .read(read),
    .y_in(k_dout), .dx(d_theta_x), .open_loop(1'b0), .r_force(1'b0),
    .load(load), .load_word('0),
    .yc(k_yc), .r_l(k_rl), .r_out(k_r),
    .dz_pos(dk_pos), .dz_neg(dk_neg), .r_contents(k_r_word)
  );

  // Integrator 6: net of the four increment lines, sent LSB first.
  always_comb begin
    sum_in_pos = {dz_pos, dk_pos, dsin_z_pos, dcos_y_pos};
    net = '0;
    for (int i = 0; i < 4; i++) net = net + (sum_in_pos[i] ? PLUS : MINUS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    inc_word <= '0;
    else if (load) inc_word <= '0;
    else if (read) inc_word <= net;
    else if (t)    inc_word <= inc_word >> 1;
  end

  time_integrator #(.WIDTH(WIDTH)) u_y6_half (
    .clk(clk), .rst_n(rst_n), .t(t), .reset_p(reset_p), .read(read),
    .y_in(inc_word[0]), .dx(1'b1), .open_loop(1'b0), .r_force(1'b0),
    .load(load), .load_word(load_y6),
    .yc(y6_yc), .r_l(y6_l), .r_out(y6_r),
    .dz_pos(y6_dz_pos), .dz_neg(y6_dz_neg), .r_contents(y6_word)
  );

  time_integrator #(.WIDTH(WIDTH)) u_r6_half (
    .clk(clk), .rst_n(rst_n), .t(t), .reset_p(reset_p), .read(read),
    .y_in(y6_l), .dx(d_t), .open_loop(1'b0), .r_force(1'b0),
    .load(load), .load_word('0),
    .yc(r6_yc), .r_l(r6_rl), .r_out(r6_r),
    .dz_pos(dz_pos), .dz_neg(dz_neg), .r_contents(r6_word)
  );
endmodule
