// Timing generator: bit clock pulses T1..T5, READ and RESET.
//
// Stands in for the clock track of the signal generator.  An iteration is
// WIDTH bit times, each marked by a one-clk pulse on t, followed by GAP
// clock periods with no T pulse (the "space" between iterations).  READ is
// given in the first gap period and RESET in the last; with the default gap
// of one period both fall in the same period, READ acting before the clk edge
// at which RESET clears the carry and complementer storage.  So one
// iteration takes WIDTH + GAP clk cycles: six with the defaults, giving
// 100/6 iterations per second at a 100 pulse/s clock.
//
// run = 0 stops the clock where it is (no t, read or reset), which leaves the
// registers holding their words.  bit_idx is the bit time (0 = T1) and is
// WIDTH or more in the gap.
module timing_generator #(
  parameter int unsigned WIDTH = di_pkg::WORD_BITS,
  parameter int unsigned GAP   = di_pkg::GAP_SLOTS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic t,
  output logic t1,
  output logic read,
  output logic reset_p,
  output logic [$clog2(WIDTH+GAP)-1:0] bit_idx
);
  localparam int unsigned SLOTS = WIDTH + GAP;
  localparam int unsigned CW    = $clog2(SLOTS);

  logic [CW-1:0] slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        slot <= '0;
    else if (run) begin
      if (slot == CW'(SLOTS - 1))      slot <= '0;
      else                             slot <= slot + 1'b1;
    end
  end

  always_comb begin
    t       = run && (slot < CW'(WIDTH));
    t1      = run && (slot == '0);
    read    = run && (slot == CW'(WIDTH));
    reset_p = run && (slot == CW'(SLOTS - 1));
    bit_idx = slot;
  end

  // Each period is either a bit time or a gap period; T1 is a bit time.
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(t && (read || reset_p)) && (!t1 || t))
    else $error("timing pulses overlap");
endmodule
