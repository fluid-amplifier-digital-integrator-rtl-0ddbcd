// Sine/cosine generator: two digital integrators in a loop.
//
// Integrator S holds cos(theta) in its y register and integrates it with
// respect to theta, so its overflows are increments of sin(theta).  Integrator
// C holds -sin(theta) in its y register and integrates it, so its overflows
// are increments of cos(theta).  Each integrator's overflow becomes the dy
// input of the other: dcos updates S's y, and -dsin (the sign inverted)
// updates C's y.  Both take the angle increments dtheta as their dx.  The
// loop structure is the design's; the rest is this implementation's.
//
// Every integrator gives exactly one +dz or -dz per iteration, so an overflow
// is passed on as a sign: a one-bit latch per integrator takes the sign of
// the overflow during READ and drives the other integrator's dy for the whole
// next iteration.  Both latches start at 1 after reset (S's dy = +, C's dy =
// -).  load presets both y registers (cos word into S, -sin word into C) and
// clears both remainders.
//
// Timing: the same iteration timing as digital_integrator.  dtheta must be
// steady from T1 to T5.  Increments leave one iteration after they are made.
module dda_sincos #(
  parameter int unsigned WIDTH = di_pkg::WORD_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             t,
  input  logic             t1,
  input  logic             reset_p,
  input  logic             read,
  input  logic             dtheta,       // 1: +dtheta, 0: -dtheta
  input  logic             load,
  input  logic [WIDTH-1:0] load_cos_word,
  input  logic [WIDTH-1:0] load_msin_word,
  output logic             dsin_pos,
  output logic             dsin_neg,
  output logic             dcos_pos,
  output logic             dcos_neg,
  output logic [WIDTH-1:0] cos_word,     // y register of S (cos theta)
  output logic [WIDTH-1:0] msin_word     // y register of C (-sin theta)
);
  logic sin_up, cos_up;   // sign of the last dsin / dcos overflow
  logic s_y_l, c_y_l;
  logic [WIDTH-1:0] s_r, c_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sin_up <= 1'b1;
      cos_up <= 1'b1;
    end else if (read) begin
      sin_up <= dsin_pos;
      cos_up <= dcos_pos;
    end
  end

  digital_integrator #(.WIDTH(WIDTH)) u_s (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dx(dtheta), .dy(cos_up),
    .load_y(load), .load_y_word(load_cos_word),
    .load_r(load), .load_r_word('0),
    .y_l(s_y_l), .dz_pos(dsin_pos), .dz_neg(dsin_neg),
    .y_contents(cos_word), .r_contents(s_r)
  );

  digital_integrator #(.WIDTH(WIDTH)) u_c (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dx(dtheta), .dy(~sin_up),
    .load_y(load), .load_y_word(load_msin_word),
    .load_r(load), .load_r_word('0),
    .y_l(c_y_l), .dz_pos(dcos_pos), .dz_neg(dcos_neg),
    .y_contents(msin_word), .r_contents(c_r)
  );
endmodule
