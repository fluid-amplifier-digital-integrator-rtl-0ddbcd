// Multiplier: two digital integrators and a summing counter, xy = ∫y dx + ∫x dy.
//
// Integrator X holds y and integrates it over x (its dy is the y increment,
// its dx the x increment); integrator Y holds x and integrates it over y (dy
// and dx swapped).  Their overflows, y dx and x dy, are summed.  The two
// integrators and the summing node are the design's; the summing node here is
// an up/down counter (the design accumulates output pulses on a counter):
// every iteration it adds +1 for each +dz and -1 for each -dz, so it moves by
// -2, 0 or +2.  Each count is worth 16 units of the product, like one
// overflow.  load presets both y registers, clears both remainders and the
// counter.
//
// Timing: as digital_integrator; dx and dy steady from T1 to T5.  product
// changes at the clk edge that ends the READ period.
module dda_multiplier #(
  parameter int unsigned WIDTH      = di_pkg::WORD_BITS,
  parameter int unsigned COUNT_BITS = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         t,
  input  logic                         t1,
  input  logic                         reset_p,
  input  logic                         read,
  input  logic                         dx,           // 1: +dx, 0: -dx
  input  logic                         dy,           // 1: +dy, 0: -dy
  input  logic                         load,
  input  logic [WIDTH-1:0]             load_x_word,
  input  logic [WIDTH-1:0]             load_y_word,
  output logic                         ydx_pos,
  output logic                         ydx_neg,
  output logic                         xdy_pos,
  output logic                         xdy_neg,
  output logic signed [COUNT_BITS-1:0] product,      // net count of increments
  output logic [WIDTH-1:0]             x_word,
  output logic [WIDTH-1:0]             y_word
);
  logic a_y_l, b_y_l;
  logic [WIDTH-1:0] a_r, b_r;
  localparam logic signed [COUNT_BITS-1:0] ONE = COUNT_BITS'(1);
  logic signed [COUNT_BITS-1:0] step;

  digital_integrator #(.WIDTH(WIDTH)) u_ydx (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dx(dx), .dy(dy),
    .load_y(load), .load_y_word(load_y_word),
    .load_r(load), .load_r_word('0),
    .y_l(a_y_l), .dz_pos(ydx_pos), .dz_neg(ydx_neg),
    .y_contents(y_word), .r_contents(a_r)
  );

  digital_integrator #(.WIDTH(WIDTH)) u_xdy (
    .clk(clk), .rst_n(rst_n), .t(t), .t1(t1), .reset_p(reset_p), .read(read),
    .dx(dy), .dy(dx),
    .load_y(load), .load_y_word(load_x_word),
    .load_r(load), .load_r_word('0),
    .y_l(b_y_l), .dz_pos(xdy_pos), .dz_neg(xdy_neg),
    .y_contents(x_word), .r_contents(b_r)
  );

  // Summing node: net of the four pulse lines in this READ period.
  always_comb begin
    step = '0;
    if (ydx_pos) step = step + ONE;
    if (ydx_neg) step = step - ONE;
    if (xdy_pos) step = step + ONE;
    if (xdy_neg) step = step - ONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    product <= '0;
    else if (load) product <= '0;
    else if (read) product <= product + step;
  end
endmodule
