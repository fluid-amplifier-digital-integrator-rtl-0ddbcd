// Testbench for shift_register.  The periodic word 11010 is fed least
// significant bit first into a cleared register: the output must be the input
// delayed by exactly five clock pulses, and after every fifth pulse the
// stages must read 11010 (FF1 = MSB).  Then the clock is stopped and the
// contents must hold; a preset and random serial data follow.
module tb_shift_register;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  logic t = 0, din = 0, load = 0;
  logic [W-1:0] load_word = '0;
  logic dout, dout_n;
  logic [W-1:0] contents;
  int checks = 0, failures = 0;
  logic [63:0] history;   // history[0] = most recent bit shifted in

  shift_register #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .t(t), .din(din), .load(load),
    .load_word(load_word), .dout(dout), .dout_n(dout_n), .contents(contents)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic pulse(input logic bit_in);
    @(negedge clk);
    t = 1; din = bit_in;
    #1;
    // Output before this pulse = bit shifted in five pulses ago.
    check(dout === history[W-1], $sformatf("dout %b expected %b", dout, history[W-1]));
    @(negedge clk);
    t = 0;
    history = {history[62:0], bit_in};
  endtask

  initial begin
    logic [W-1:0] word;
    history = '0;
    #12 rst_n = 1;
    #1;
    check(contents == '0, "register not cleared at reset");
    word = 5'b11010;
    for (int it = 0; it < 4; it++) begin
      for (int k = 0; k < W; k++) pulse(word[k]);
      check(contents == word, $sformatf("contents %b after iteration %0d", contents, it));
    end
    // Clock removed: contents hold.
    repeat (20) @(negedge clk);
    check(contents == word, "contents lost while the clock is stopped");
    // Preset.
    @(negedge clk);
    load = 1; load_word = 5'b01101;
    @(negedge clk);
    load = 0;
    check(contents == 5'b01101, "preset failed");
    history[W-1:0] = {1'b1, 1'b0, 1'b1, 1'b1, 1'b0};  // LSB of the word leaves first
    // Random data.
    for (int i = 0; i < 200; i++) pulse(1'($urandom));
    check(contents == {history[0], history[1], history[2], history[3], history[4]},
          "contents after random data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
