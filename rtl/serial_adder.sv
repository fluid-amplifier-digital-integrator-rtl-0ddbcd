// Bit-serial adder with carry storage and overflow stage.
//
// Adds two words presented one bit per clock pulse T, least significant bit
// first.  Half adder 1 adds the bits a and b; half adder 2 adds that partial
// sum to the carry held from the previous bit.  The two carries are ORed and
// stored in a register stage, so a carry-out becomes the carry-in one clock
// pulse later.  The structure (two half adders, an OR, one-bit carry storage)
// is the design's.
//
// Overflow stage: after T5 the carry register holds the carry out of the most
// significant bit.  During the READ pulse this carry is gated out as +dz when
// present and as -dz when absent, so every iteration gives exactly one
// overflow pulse of one sign.  The RESET pulse then clears the carry.  READ
// and RESET may fall in the same clock period: the overflow is read from the
// carry before the clk edge at which RESET clears it.
//
// Ports: a, b serial operand bits; sum serial result (combinational, valid in
// the same bit time as a and b); carry_in is the stored carry; dz_pos and
// dz_neg are one-clk pulses, high only while read is high.  An assertion
// checks that READ and RESET never coincide with a bit time.
module serial_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic t,        // bit clock pulse
  input  logic reset_p,  // end-of-iteration RESET pulse
  input  logic read,     // end-of-iteration READ pulse
  input  logic a,
  input  logic b,
  output logic sum,
  output logic sum_n,
  output logic carry_in,
  output logic dz_pos,
  output logic dz_neg
);
  logic s1, s1_n, c1, c1_n;
  logic c2, c2_n;
  logic carry_out, carry_in_n;

  half_adder_stage u_ha1 (.a(a),  .b(b),        .s(s1),  .s_n(s1_n),  .c(c1), .c_n(c1_n));
  half_adder_stage u_ha2 (.a(s1), .b(carry_in), .s(sum), .s_n(sum_n), .c(c2), .c_n(c2_n));

  // OR element summing the two carries (its NOR leg is not used).
  logic carry_out_n;
  or_nor u_carry_or (.a(c1), .b(c2), .or_out(carry_out), .nor_out(carry_out_n));

  // One-bit carry storage, cleared by RESET.
  register_stage #(.RESET_STATE(1'b0)) u_carry (
    .clk(clk), .rst_n(rst_n), .t(t), .d(carry_out),
    .preset(reset_p), .preset_val(1'b0),
    .q(carry_in), .q_n(carry_in_n)
  );

  // Overflow stage: READ gates the final carry onto +dz or -dz.
  always_comb begin
    dz_pos = read & carry_in;
    dz_neg = read & carry_in_n;
  end

  // Timing rule: READ and RESET fall only between words, never in a bit time.
  a_no_read_in_bit_time: assert property (@(posedge clk) disable iff (!rst_n)
    !(t && (read || reset_p)))
    else $error("READ or RESET during a bit time");
endmodule
