// Serial shift register of WIDTH register stages (5 in the design).
//
// The stages are in series: at each clock pulse T the input bit enters the
// first stage (FF1) and every stage passes its bit to the next; the output is
// the last stage (FF5).  A word fed in least significant bit first appears at
// the output WIDTH pulses later, so the register delays the word by exactly
// one iteration.  Between iterations (after a whole number of words) FF1
// holds the most significant bit and FF5 the least, which is what contents
// shows.  With no T pulses the stages hold their bits.
//
// load presets every stage from load_word (MSB into FF1) so an initial value
// can be inserted; this port is this implementation's choice.  rst_n clears
// the register (the design starts from a cleared register).
//
// Ports: din serial in; dout (and dout_n) serial out = FF5; contents = the
// stages as a word {FF1 .. FF5}.
module shift_register #(
  parameter int unsigned WIDTH = di_pkg::WORD_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             t,
  input  logic             din,
  input  logic             load,
  input  logic [WIDTH-1:0] load_word,
  output logic             dout,
  output logic             dout_n,
  output logic [WIDTH-1:0] contents
);
  // ff[0] is FF1 (input end), ff[WIDTH-1] is FF5 (output end).
  logic [WIDTH-1:0] ff;
  logic [WIDTH-1:0] ff_n;

  for (genvar k = 0; k < WIDTH; k++) begin : g_stage
    logic stage_in;
    if (k == 0) begin : g_first
      assign stage_in = din;
    end else begin : g_next
      assign stage_in = ff[k-1];
    end
    register_stage #(.RESET_STATE(1'b0)) u_ff (
      .clk(clk), .rst_n(rst_n), .t(t), .d(stage_in),
      .preset(load), .preset_val(load_word[WIDTH-1-k]),
      .q(ff[k]), .q_n(ff_n[k])
    );
    // FF1 is the MSB of the stored word, FF5 the LSB.
    assign contents[WIDTH-1-k] = ff[k];
  end

  assign dout   = ff[WIDTH-1];
  assign dout_n = ff_n[WIDTH-1];
endmodule
