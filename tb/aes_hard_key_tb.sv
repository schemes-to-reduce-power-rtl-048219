// aes_hard_key_tb: end-to-end test of the shared-bus, stored-key core.
// Stores a key, encrypts several blocks with it without sending it again,
// changes keys, checks that reset alone keeps the key and reset with
// store_key clears it (later encryptions then use the all-zero key), that
// start together with store_key only stores the key, and that data_valid
// comes LATENCY cycles after the start cycle. Results are compared with the
// reference model and the FIPS-197 examples.
module aes_hard_key_tb;
  import aes_ref_pkg::*;
  localparam int LATENCY = 11;
  logic         clk = 0, rst, start, store_key, data_valid;
  logic [127:0] data_in, data_out, cur_key;
  int checks = 0, failures = 0, cycles = 0;

  aes_hard_key dut (.clk, .rst, .start, .store_key, .data_in, .data_out, .data_valid);

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

  task automatic store(logic [127:0] key);
    store_key = 1'b1; data_in = key;
    @(posedge clk); #1;
    store_key = 1'b0; data_in = rand_blk();
    cur_key = key;
  endtask

  task automatic encrypt(logic [127:0] pt, string what);
    logic [127:0] exp = ref_encrypt(pt, cur_key);
    int t0;
    start = 1'b1; data_in = pt;
    @(posedge clk); #1; t0 = cycles;
    start = 1'b0; data_in = rand_blk();
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
    rst = 1'b1; store_key = 1'b1; start = 1'b0; data_in = '0; cur_key = '0;
    @(posedge clk); #1;
    store_key = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    store(128'h2b7e151628aed2a6abf7158809cf4f3c);
    encrypt(128'h3243f6a8885a308d313198a2e0370734, "FIPS-197 App. B");
    check(data_out, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 App. B known answer");
    // Same key, no retransmission.
    for (int n = 0; n < 10; n++) encrypt(rand_blk(), $sformatf("stored key %0d", n));
    // Key change costs one cycle.
    @(posedge clk); #1;
    store(128'h000102030405060708090a0b0c0d0e0f);
    encrypt(128'h00112233445566778899aabbccddeeff, "FIPS-197 App. C.1");
    check(data_out, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 App. C.1 known answer");
    // Reset alone keeps the key.
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    encrypt(128'h00112233445566778899aabbccddeeff, "after reset, key kept");
    check(data_out, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "after reset known answer");
    // start with store_key: stores, no encryption.
    start = 1'b1; store_key = 1'b1; data_in = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    @(posedge clk); #1;
    start = 1'b0; store_key = 1'b0; cur_key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    repeat (LATENCY + 1) begin
      checks++;
      if (data_valid) begin failures++; $display("FAIL start with store_key began an encryption"); end
      @(posedge clk); #1;
    end
    encrypt(128'h3243f6a8885a308d313198a2e0370734, "key stored with start high");
    check(data_out, 128'h3925841d02dc09fbdc118597196a0b32, "stored-with-start known answer");
    // Reset with store_key clears the key.
    rst = 1'b1; store_key = 1'b1; @(posedge clk); #1 rst = 1'b0; store_key = 1'b0;
    cur_key = '0;
    encrypt(128'h00112233445566778899aabbccddeeff, "cleared key");
    // Random keys and blocks.
    for (int k = 0; k < 8; k++) begin
      store(rand_blk());
      for (int n = 0; n < 5; n++) encrypt(rand_blk(), $sformatf("key %0d block %0d", k, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
