// aes_standard_tb: end-to-end test of the separate-bus core. Encrypts the
// FIPS-197 examples and random blocks with random keys, compares with the
// reference model, and checks the timing: data_valid exactly 11 cycles after
// the start cycle, one cycle long, no new result while busy, inputs changed
// after the start cycle ignored, data_out held afterwards, and a new start
// accepted in the data_valid cycle (back-to-back encryptions).
module aes_standard_tb;
  import aes_ref_pkg::*;
  localparam int LATENCY = 11;
  logic         clk = 0, rst, start, data_valid;
  logic [127:0] key_in, data_in, data_out;
  int checks = 0, failures = 0, cycles = 0;

  aes_standard dut (.clk, .rst, .start, .key_in, .data_in, .data_out, .data_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  // Called with the inputs settling before a clock edge; returns in the
  // data_valid cycle (just after its opening edge).
  task automatic encrypt(logic [127:0] pt, logic [127:0] key, string what);
    logic [127:0] exp = ref_encrypt(pt, key);
    int t0;
    start = 1'b1; data_in = pt; key_in = key;
    @(posedge clk); #1; t0 = cycles;
    start = 1'b0; data_in = rand_blk(); key_in = rand_blk();   // must be ignored
    for (int c = 1; c < LATENCY; c++) begin
      checks++;
      if (data_valid) begin
        failures++;
        $display("FAIL %s: data_valid early in cycle %0d", what, c);
      end
      @(posedge clk); #1;
    end
    checks++;
    if (!data_valid) begin
      failures++;
      $display("FAIL %s: data_valid not high %0d cycles after start", what, LATENCY);
    end
    check(data_out, exp, what);
    checks++;
    if (cycles - t0 + 1 != LATENCY) begin
      failures++;
      $display("FAIL %s: latency %0d", what, cycles - t0 + 1);
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; data_in = '0; key_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, "FIPS-197 App. B");
    check(data_out, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 App. B known answer");
    @(posedge clk); #1;
    checks++;
    if (data_valid) begin failures++; $display("FAIL data_valid longer than one cycle"); end
    check(data_out, 128'h3925841d02dc09fbdc118597196a0b32, "data_out held");
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, "FIPS-197 App. C.1");
    check(data_out, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 App. C.1 known answer");
    // Back-to-back: each start is given in the previous data_valid cycle.
    for (int n = 0; n < 60; n++) encrypt(rand_blk(), rand_blk(), $sformatf("random %0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
