// Exponential generator: one digital integrator fed back on itself.
//
// The integrator's overflow dZ = Z dx is returned as its own dy, so the y
// register holds Z and grows in proportion to itself: Z = e^x in increment
// form.  This single-cell loop is the design's function-generation example;
// how the feedback is wired is this implementation's: a one-bit latch takes
// the sign of the overflow during READ and drives dy for the whole next
// iteration (reset value: +).  load presets Z, clears the remainder and
// sets the latch back to +.
//
// With 5-bit words Z wraps modulo 32 like every register of the cell; nothing
// limits it.  Timing: as digital_integrator; dx must be steady from T1 to T5.
module dda_exp #(
  parameter int unsigned WIDTH = di_pkg::WORD_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             t,
  input  logic             t1,
  input  logic             reset_p,
  input  logic             read,
  input  logic             dx,
  input  logic             load,
  input  logic [WIDTH-1:0] load_z_word,
  output logic             dz_pos,
  output logic             dz_neg,
  output logic [WIDTH-1:0] z_word
);
  logic z_up;   // sign of the last overflow, fed back as dy
  logic y_l;
  logic [WIDTH-1:0] r_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    z_up <= 1'b1;
    else if (load) z_up <= 1'b1;
    else if (read) z_up <= dz_pos;
  end

  digital_integrator #(.WIDTH(WIDTH)) u_di (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dx(dx), .dy(z_up),
    .load_y(load), .load_y_word(load_z_word),
    .load_r(load), .load_r_word('0),
    .y_l(y_l), .dz_pos(dz_pos), .dz_neg(dz_neg),
    .y_contents(z_word), .r_contents(r_word)
  );
endmodule
