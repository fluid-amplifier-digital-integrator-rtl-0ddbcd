// Testbench for register_stage: random clock pulses, data and presets,
// compared every cycle with a one-line reference model; also checks that the
// bit is held while no clock pulse is given.
module tb_register_stage;
  logic clk = 0, rst_n = 0;
  logic t = 0, d = 0, preset = 0, preset_val = 0;
  logic q, q_n;
  logic model;
  int checks = 0, failures = 0;
  int held = 0;

  register_stage #(.RESET_STATE(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .t(t), .d(d), .preset(preset),
    .preset_val(preset_val), .q(q), .q_n(q_n)
  );

  always #5 clk = ~clk;

  initial begin
    model = 1'b1;
    #12;
    checks++;
    if (q !== 1'b1) begin failures++; $display("FAIL reset state"); end
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      t          = ($urandom % 3) == 0;
      d          = $urandom % 2;
      preset     = ($urandom % 10) == 0;
      preset_val = $urandom % 2;
      @(posedge clk);
      if (preset)      model = preset_val;
      else if (t)      model = d;
      else             held++;
      #1;
      checks++;
      if (q !== model || q_n !== ~model) begin
        failures++;
        $display("FAIL cycle %0d: q=%b expected %b", i, q, model);
      end
    end
    checks++;
    if (held == 0) begin failures++; $display("FAIL hold never exercised"); end
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
