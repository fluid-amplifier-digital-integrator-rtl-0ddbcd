// OR-NOR element.
//
// The basic logic element of the integrator: a two-input element with two
// complementary outputs.  A signal on either input gives the OR output; with
// neither input present the NOR output is high.  Every gate of the adder and
// the complementer is built from this one element, as the design does to
// standardise on a single element type.  Purely combinational, no timing.
//
// Ports: a, b inputs; or_out = a | b; nor_out = ~(a | b).
module or_nor (
  input  logic a,
  input  logic b,
  output logic or_out,
  output logic nor_out
);
  always_comb begin
    or_out  = a | b;
    nor_out = ~(a | b);
  end
endmodule
