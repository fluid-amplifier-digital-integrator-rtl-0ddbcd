// Shared constants of the serial digital integrator.
//
// The integrator works on 5-bit words sent one bit per clock pulse, least
// significant bit first.  One iteration is WORD_BITS bit times (pulses T1..T5)
// followed by GAP_SLOTS empty clock periods in which the READ and RESET pulses
// occur.  Word length, the one-period gap and the bias of 16 follow the
// design; the names are this implementation's.
//
// Numbers are biased: a raw word w stands for the value w - BIAS, so 00000 is
// -16 and 11111 is +15, and one overflow pulse (+dz or -dz) is worth BIAS
// units of the integral.
package di_pkg;
  parameter int unsigned WORD_BITS = 5;   // bits per word
  parameter int unsigned GAP_SLOTS = 1;   // clock periods between T5 and T1
  parameter int unsigned BIAS      = 16;  // 2**(WORD_BITS-1)

endpackage
