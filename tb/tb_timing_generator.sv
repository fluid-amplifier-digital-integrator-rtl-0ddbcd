// Testbench for timing_generator at its default sizes (5 bit times, 1 gap
// period).  Checks, cycle by cycle, that an iteration is six clk periods:
// T pulses in the first five with T1 marked in the first, READ and RESET
// together in the sixth, and nothing else.  Checks the rate: 1020 clock
// periods (10 s at 102 pulses/s) give 170 READ pulses and 850 T pulses.
// Then stops the clock with run = 0 (no pulses at all) and checks that it
// resumes at the bit time where it stopped.
module tb_timing_generator;
  localparam int W = 5, G = 1, S = W + G;
  logic clk = 0, rst_n = 0, run = 0;
  logic t, t1, read, reset_p;
  logic [$clog2(S)-1:0] bit_idx;
  int checks = 0, failures = 0;

  timing_generator dut (
    .clk(clk), .rst_n(rst_n), .run(run),
    .t(t), .t1(t1), .read(read), .reset_p(reset_p), .bit_idx(bit_idx)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int n_t = 0, n_read = 0, n_reset = 0;
    int slot_model = 0;
    #12 rst_n = 1;
    @(negedge clk);
    run = 1;
    for (int c = 0; c < 1020; c++) begin
      #1;
      check(t == (slot_model < W), $sformatf("t at slot %0d", slot_model));
      check(t1 == (slot_model == 0), $sformatf("t1 at slot %0d", slot_model));
      check(read == (slot_model == W), $sformatf("read at slot %0d", slot_model));
      check(reset_p == (slot_model == S - 1), $sformatf("reset at slot %0d", slot_model));
      check(int'(bit_idx) == slot_model, "bit_idx");
      if (t) n_t++;
      if (read) n_read++;
      if (reset_p) n_reset++;
      @(negedge clk);
      slot_model = (slot_model + 1) % S;
    end
    check(n_read == 170 && n_reset == 170, $sformatf("%0d READ, %0d RESET in 1020 periods", n_read, n_reset));
    check(n_t == 850, $sformatf("%0d T pulses in 1020 periods", n_t));

    // Stop in the middle of an iteration.
    repeat (2) begin @(negedge clk); slot_model = (slot_model + 1) % S; end
    run = 0;
    for (int c = 0; c < 20; c++) begin
      #1;
      check(!t && !t1 && !read && !reset_p, "pulse while stopped");
      @(negedge clk);
    end
    check(int'(bit_idx) == slot_model, "position lost while stopped");
    run = 1;
    #1;
    check(t == (slot_model < W), "resume");
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
