// Serial two's complementer.
//
// Passes a serial word (least significant bit first) unchanged when the
// control input ctrl is present, and forms its two's complement (2^B - N)
// when ctrl is absent.  The rule used is the design's: the low-order zeros and
// the first one pass unchanged, every later bit is inverted.
//
// A stored control bit D decides which: with D present the output is g = e,
// with D absent g = ~e, i.e. g = D XNOR e.  F = D & ~e is the next value of D,
// so D drops out one bit time after the first one of the word has passed.
// Both g and F come from one half-adder stage fed with D and ~e (g is its sum,
// F its carry), as in the design.  The RESET pulse after every iteration puts
// D back to "present".  How ctrl acts on the storage is not given; here ctrl
// present holds D at 1 (next D = F | ctrl), so the word passes unchanged.
//
// An assertion flags a change of ctrl between two bit times of a word.
//
// Ports: e serial input bit; ctrl = 1 for "pass" (+dx), 0 for "complement"
// (-dx); g and g_n serial output (combinational, same bit time as e).
// ctrl must be steady from T1 to T5.
module complementer (
  input  logic clk,
  input  logic rst_n,
  input  logic t,        // bit clock pulse
  input  logic reset_p,  // end-of-iteration RESET pulse
  input  logic ctrl,     // 1: pass the word, 0: complement it
  input  logic e,
  output logic g,
  output logic g_n
);
  logic d, d_n;
  logic f, f_n;
  logic d_next;

  // Half-adder stage as complementer logic: sum = d ^ ~e = g, carry = d & ~e = f.
  half_adder_stage u_logic (.a(d), .b(~e), .s(g), .s_n(g_n), .c(f), .c_n(f_n));

  always_comb d_next = f | ctrl;

  // One-bit storage for D, returned to "D present" by RESET.
  register_stage #(.RESET_STATE(1'b1)) u_store (
    .clk(clk), .rst_n(rst_n), .t(t), .d(d_next),
    .preset(reset_p), .preset_val(1'b1),
    .q(d), .q_n(d_n)
  );

  // Timing rule: the control input is steady from one bit time to the next.
  a_ctrl_steady: assert property (@(posedge clk) disable iff (!rst_n)
    (t && $past(t)) |-> (ctrl == $past(ctrl)))
    else $error("complementer control changed inside a word");
endmodule
