// Complete digital integrator: z = integral of y dx, as a stream of +-dz pulses.
//
// Two identical time integrators share the bit clock.  The y half keeps the
// integrand: each iteration its complementer turns the unit word 00..01 into
// +1 (dy present) or -1 (dy absent, two's complement 11..11), and its adder
// adds that to the y register.  The adder's output Y_L is the updated y; it
// goes back into the y register and, in the same bit time, on to the R half.
// The R half adds Y_L to the remainder register R when dx is present and
// subtracts it when dx is absent; the final carry of that addition is the
// +dz / -dz output.  An absent dx or dy input is taken as the negative
// increment; to hold a variable constant, alternate its input every iteration.
// The y half's overflow pulses are not used.
//
// Where the unit increment enters the y half is not given in detail: here
// the y half's complementer is fed the unit word (one at T1, zeros after),
// following the block diagram in which dy enters through a complementer.
//
// Timing: iteration = WIDTH clk cycles with t high (t1 marks the first) and
// then the gap with read and reset_p.  dx and dy must be steady from T1 to
// T5.  dz_pos/dz_neg are valid while read is high.  load_y/load_r preset the
// registers (between iterations); y_contents/r_contents show them then.
module digital_integrator #(
  parameter int unsigned WIDTH = di_pkg::WORD_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             t,
  input  logic             t1,       // high in the bit time of T1
  input  logic             reset_p,
  input  logic             read,
  input  logic             dx,       // 1: +dx, 0: -dx
  input  logic             dy,       // 1: +dy, 0: -dy
  input  logic             load_y,
  input  logic [WIDTH-1:0] load_y_word,
  input  logic             load_r,
  input  logic [WIDTH-1:0] load_r_word,
  output logic             y_l,      // serial updated y (Y_L)
  output logic             dz_pos,
  output logic             dz_neg,
  output logic [WIDTH-1:0] y_contents,
  output logic [WIDTH-1:0] r_contents
);
  logic unit_word;
  logic y_yc, y_r, y_dz_pos, y_dz_neg;
  logic r_yc, r_rl, r_r;

  // Unit increment: a one in the least significant bit time only.
  always_comb unit_word = t1;

  time_integrator #(.WIDTH(WIDTH)) u_y_half (
    .clk(clk), .rst_n(rst_n), .t(t), .reset_p(reset_p), .read(read),
    .y_in(unit_word), .dx(dy), .open_loop(1'b0), .r_force(1'b0),
    .load(load_y), .load_word(load_y_word),
    .yc(y_yc), .r_l(y_l), .r_out(y_r),
    .dz_pos(y_dz_pos), .dz_neg(y_dz_neg), .r_contents(y_contents)
  );

  time_integrator #(.WIDTH(WIDTH)) u_r_half (
    .clk(clk), .rst_n(rst_n), .t(t), .reset_p(reset_p), .read(read),
    .y_in(y_l), .dx(dx), .open_loop(1'b0), .r_force(1'b0),
    .load(load_r), .load_word(load_r_word),
    .yc(r_yc), .r_l(r_rl), .r_out(r_r),
    .dz_pos(dz_pos), .dz_neg(dz_neg), .r_contents(r_contents)
  );
endmodule
