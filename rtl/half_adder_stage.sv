// Half-adder stage built from three OR-NOR elements.
//
// Element 1 takes the complements of both inputs, so its NOR output is the
// carry c = a & b and its OR output the carry's complement.  Element 2 takes
// a and b; its NOR output (~a & ~b) and the carry feed element 3, whose OR
// output is the complement of the sum (a XNOR b) and whose NOR output is the
// sum a ^ b.  This is the three-element circuit of the design; the same stage,
// fed with d and ~e, forms the complementer logic (g = s, f = c).
// Purely combinational.
//
// Ports: a, b inputs; s, s_n sum and complement; c, c_n carry and complement.
module half_adder_stage (
  input  logic a,
  input  logic b,
  output logic s,
  output logic s_n,
  output logic c,
  output logic c_n
);
  logic nor_ab;
  logic unused_or_ab;

  // Element 1: inputs ~a, ~b.  NOR = a & b (carry), OR = ~a | ~b (~carry).
  or_nor u_e1 (.a(~a), .b(~b), .or_out(c_n), .nor_out(c));
  // Element 2: inputs a, b.  Only its NOR output is used.
  or_nor u_e2 (.a(a), .b(b), .or_out(unused_or_ab), .nor_out(nor_ab));
  // Element 3: NOR(a,b) and carry.  OR = a XNOR b = ~sum, NOR = sum.
  or_nor u_e3 (.a(nor_ab), .b(c), .or_out(s_n), .nor_out(s));
endmodule
