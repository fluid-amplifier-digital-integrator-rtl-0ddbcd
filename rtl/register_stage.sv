// One-bit register stage (clocked storage cell).
//
// The storage cell of the integrator, used for the adder's carry, the
// complementer's control bit and each stage of the shift register.  Two gates
// pass the input and its complement only while the clock pulse T is present;
// the gate that conducts sets or clears a bistable, which then holds the bit
// until the next pulse.  The design's cell is made of two gating amplifiers and
// a flip-flop; here the gates are (t & d) and (t & ~d) and the bistable is a
// flip-flop on the system clock clk, so "a clock pulse T" means a clk edge
// with t high.
//
// A preset input forces the bistable to preset_val regardless of T.  The
// adder and complementer use it for the RESET pulse given after every
// iteration; the shift register uses it to insert an initial word (this
// implementation's choice: the design inserts initial contents but does not
// say how).  rst_n is an asynchronous power-on reset to RESET_STATE.
//
// Timing: q changes one clk edge after a T pulse; q_n is always ~q.
module register_stage #(
  parameter bit RESET_STATE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic t,          // clock pulse T (one clk cycle wide)
  input  logic d,          // data: the value to pass on at T
  input  logic preset,     // force the stored bit to preset_val
  input  logic preset_val,
  output logic q,
  output logic q_n
);
  logic gate_set, gate_clr;

  // The two clock-gated amplifiers: no output unless T is present.
  always_comb begin
    gate_set = t & d;
    gate_clr = t & ~d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= RESET_STATE;
    else if (preset)   q <= preset_val;
    else if (gate_set) q <= 1'b1;
    else if (gate_clr) q <= 1'b0;
  end

  assign q_n = ~q;
endmodule
