// aes_ctrl_tb: checks the round sequencer at its default STEPS = 10: load
// only when idle, step counting 1..10, last in the tenth busy cycle,
// data_valid exactly 11 cycles after start, a start in the data_valid cycle
// accepted, starts while busy ignored, and reset returning it to idle.
module aes_ctrl_tb;
  logic       clk = 0, rst, start;
  logic       load, busy, last, data_valid;
  logic [3:0] step;
  int checks = 0, failures = 0, cycles = 0;

  aes_ctrl dut (.clk, .rst, .start, .load, .busy, .step, .last, .data_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Drive start for one cycle at a cycle boundary and follow one operation.
  task automatic run_one(bit noisy_start);
    int t0;
    start = 1'b1; #1;
    expect_eq(load, 1, "load with start while idle");
    @(posedge clk); #1; t0 = cycles;
    start = 1'b0;
    for (int s = 1; s <= 10; s++) begin
      if (noisy_start) start = 1'b1;
      #1;
      expect_eq(busy, 1, "busy");
      expect_eq(load, 0, "no load while busy");
      expect_eq(step, s, "step");
      expect_eq(last, s == 10, "last");
      expect_eq(data_valid, 0, "no valid while busy");
      @(posedge clk); #1;
      start = 1'b0;
    end
    expect_eq(data_valid, 1, "valid after ten rounds");
    expect_eq(busy, 0, "idle in valid cycle");
    expect_eq(cycles - t0 + 1, 11, "latency in cycles from start");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    #1 expect_eq(busy, 0, "idle after reset");
    run_one(1'b0);
    run_one(1'b1);       // starts while busy ignored, start in the valid cycle accepted
    @(posedge clk); #1;
    expect_eq(data_valid, 0, "valid is one cycle long");
    // Reset in the middle of an operation.
    start = 1'b1; @(posedge clk); #1; start = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    expect_eq(busy, 0, "reset aborts");
    repeat (12) begin
      @(posedge clk); #1;
      expect_eq(data_valid, 0, "no valid after abort");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
