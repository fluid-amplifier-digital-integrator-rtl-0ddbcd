// Word generator: a fixed word sent serially every iteration.
//
// Stands in for the coded disk of the signal generator, which supplies the
// integrand Y_L (and its inverse) to the half integrator.  The pattern WORD
// circulates in a WIDTH-bit ring: the output is the ring's low bit and each
// T pulse rotates the ring by one, so the word appears least significant bit
// first in T1..T5 and the ring is back in place after every iteration.  The
// default word 10101 (+5 in the biased code) is the one the design was tested
// with.  Between T5 and the next T1 the output is 0 (the disk's slots are
// only under the receiver during bit times).
//
// Ports: t from the timing generator; y_l/y_l_n serial word.  Timing: the
// word must start in phase with T1; the ring is realigned at reset.
module word_generator #(
  parameter int unsigned WIDTH = di_pkg::WORD_BITS,
  parameter logic [WIDTH-1:0] WORD = WIDTH'(5'b10101)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic t,        // bit clock pulse
  output logic y_l,
  output logic y_l_n
);
  logic [WIDTH-1:0] ring;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ring <= WORD;
    else if (t)  ring <= {ring[0], ring[WIDTH-1:1]};
  end

  always_comb begin
    y_l   = t & ring[0];
    y_l_n = t & ~ring[0];
  end
endmodule
