// Time integrator: one half of the digital integrator.
//
// Complementer, serial adder and a WIDTH-stage register in a loop.  Every
// iteration the serial input word y_in (least significant bit first, one bit
// per T pulse) passes the complementer, unchanged when dx is present and
// complemented when it is absent, and is added to the register output r_out.
// The sum r_l is shifted back into the register, and the final carry is read
// out as a +dz or -dz overflow pulse.  So the register accumulates +-y once
// per iteration and each overflow stands for 2^WIDTH raw units (a biased
// value of 16 in the integral).  This is the half that the design built and
// tested; the complete integrator uses two of them (see digital_integrator).
//
// open_loop selects the design's open-loop test arrangement: the adder's
// second operand is then a constant word (all zeros when r_force is 0, all
// ones when it is 1) instead of the register output, and the adder output is
// still shifted into the register.  load presets the register to load_word
// (this implementation's means of inserting an initial remainder).
//
// Timing: one iteration is WIDTH clk cycles with t high (T1..T5) and then the
// gap with read and reset_p high.  dx, open_loop and r_force must be steady
// from T1 to T5.  dz_pos/dz_neg are valid during read.  r_contents is the
// stored word, meaningful between iterations.
module time_integrator #(
  parameter int unsigned WIDTH = di_pkg::WORD_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             t,
  input  logic             reset_p,
  input  logic             read,
  input  logic             y_in,       // serial input word (Y_L)
  input  logic             dx,         // 1: +dx (add y), 0: -dx (subtract y)
  input  logic             open_loop,  // 1: adder takes r_force instead of R
  input  logic             r_force,    // constant R bit in open-loop mode
  input  logic             load,       // preset the register
  input  logic [WIDTH-1:0] load_word,
  output logic             yc,         // complementer output Y_C
  output logic             r_l,        // adder output R_L
  output logic             r_out,      // register output R
  output logic             dz_pos,
  output logic             dz_neg,
  output logic [WIDTH-1:0] r_contents
);
  logic yc_n, r_l_n, r_out_n, carry_in;
  logic adder_b;

  complementer u_comp (
    .clk(clk), .rst_n(rst_n), .t(t), .reset_p(reset_p),
    .ctrl(dx), .e(y_in), .g(yc), .g_n(yc_n)
  );

  always_comb adder_b = open_loop ? r_force : r_out;

  serial_adder u_add (
    .clk(clk), .rst_n(rst_n), .t(t), .reset_p(reset_p), .read(read),
    .a(yc), .b(adder_b), .sum(r_l), .sum_n(r_l_n), .carry_in(carry_in),
    .dz_pos(dz_pos), .dz_neg(dz_neg)
  );

  shift_register #(.WIDTH(WIDTH)) u_reg (
    .clk(clk), .rst_n(rst_n), .t(t), .din(r_l),
    .load(load), .load_word(load_word),
    .dout(r_out), .dout_n(r_out_n), .contents(r_contents)
  );
endmodule
