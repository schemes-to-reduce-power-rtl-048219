// aes_power_top_tb: end-to-end test of the three cores at their default
// sizes, run side by side from one clock.
//
// Each core gets its own stream of random encryptions, checked against the
// reference model for the ciphertext and for the cycle count from start to
// data_valid (11, 11 and 6). Along the way the test makes every mechanism of
// the designs happen and counts it: the final-round MixColumns bypass, a
// start given in the data_valid cycle (back-to-back), a start ignored while
// busy, a key written into key storage, an encryption reusing a stored key,
// store_key winning over start, reset keeping the stored key, and reset with
// store_key clearing it. A mechanism that never happened counts as a failure.
module aes_power_top_tb;
  import aes_ref_pkg::*;

  logic         clk = 0, rst;
  logic         std_start, std_data_valid;
  logic [127:0] std_key_in, std_data_in, std_data_out;
  logic         hk_start, hk_store_key, hk_data_valid;
  logic [127:0] hk_data_in, hk_data_out;
  logic         ds_start, ds_store_key, ds_data_valid;
  logic [127:0] ds_data_in, ds_data_out;

  int checks = 0, failures = 0, cycles = 0;

  // Mechanism counters.
  int n_bypass_std = 0, n_bypass_hk = 0, n_bypass_ds = 0, n_odd_bypass_used = 0;
  int n_back_to_back = 0, n_busy_start = 0, n_key_store = 0, n_key_reuse = 0;
  int n_store_priority = 0, n_reset_keeps = 0, n_reset_clears = 0, n_encryptions = 0;

  aes_power_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // The final-round bypass is seen inside the round blocks.
  always @(posedge clk) begin
    if (dut.u_standard.u_round.final_round)     n_bypass_std++;
    if (dut.u_hard_key.u_round.final_round)     n_bypass_hk++;
    if (dut.u_dual_stage.u_round_even.final_round) n_bypass_ds++;
    if (dut.u_dual_stage.u_round_odd.final_round)  n_odd_bypass_used++;
  end

  initial begin
    wait (cycles == 100000);
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

  task automatic check_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- Standard core ----------------
  task automatic std_encrypt(logic [127:0] pt, logic [127:0] key, bit noisy, string what);
    logic [127:0] exp = ref_encrypt(pt, key);
    int t0;
    std_start = 1'b1; std_data_in = pt; std_key_in = key;
    @(posedge clk); #1; t0 = cycles;
    std_start = 1'b0; std_data_in = rand_blk(); std_key_in = rand_blk();
    for (int c = 1; c < 11; c++) begin
      check_true(!std_data_valid, {what, ": std data_valid early"});
      if (noisy && c == 4) begin std_start = 1'b1; n_busy_start++; end
      @(posedge clk); #1;
      std_start = 1'b0;
    end
    check_true(std_data_valid, {what, ": std data_valid after 11 cycles"});
    check_true(cycles - t0 + 1 == 11, {what, ": std latency"});
    check(std_data_out, exp, {what, ": std ciphertext"});
    n_encryptions++;
  endtask

  // ---------------- Hard Key core ----------------
  logic [127:0] hk_key;
  bit           hk_key_used;

  task automatic hk_store(logic [127:0] key, bit with_start);
    hk_store_key = 1'b1; hk_start = with_start; hk_data_in = key;
    @(posedge clk); #1;
    hk_store_key = 1'b0; hk_start = 1'b0; hk_data_in = rand_blk();
    hk_key = key; hk_key_used = 1'b0; n_key_store++;
    if (with_start) begin
      repeat (12) begin
        check_true(!hk_data_valid, "hk start with store_key began an encryption");
        @(posedge clk); #1;
      end
      n_store_priority++;
    end
  endtask

  task automatic hk_encrypt(logic [127:0] pt, bit noisy, string what);
    logic [127:0] exp = ref_encrypt(pt, hk_key);
    int t0;
    if (hk_key_used) n_key_reuse++;
    hk_start = 1'b1; hk_data_in = pt;
    @(posedge clk); #1; t0 = cycles;
    hk_start = 1'b0; hk_data_in = rand_blk();
    for (int c = 1; c < 11; c++) begin
      check_true(!hk_data_valid, {what, ": hk data_valid early"});
      if (noisy && c == 6) begin hk_start = 1'b1; n_busy_start++; end
      @(posedge clk); #1;
      hk_start = 1'b0;
    end
    check_true(hk_data_valid, {what, ": hk data_valid after 11 cycles"});
    check_true(cycles - t0 + 1 == 11, {what, ": hk latency"});
    check(hk_data_out, exp, {what, ": hk ciphertext"});
    hk_key_used = 1'b1;
    n_encryptions++;
  endtask

  // ---------------- Dual Stage core ----------------
  logic [127:0] ds_key;
  bit           ds_key_used;

  task automatic ds_store(logic [127:0] key, bit with_start);
    ds_store_key = 1'b1; ds_start = with_start; ds_data_in = key;
    @(posedge clk); #1;
    ds_store_key = 1'b0; ds_start = 1'b0; ds_data_in = rand_blk();
    ds_key = key; ds_key_used = 1'b0; n_key_store++;
    if (with_start) begin
      repeat (7) begin
        check_true(!ds_data_valid, "ds start with store_key began an encryption");
        @(posedge clk); #1;
      end
      n_store_priority++;
    end
  endtask

  task automatic ds_encrypt(logic [127:0] pt, bit noisy, string what);
    logic [127:0] exp = ref_encrypt(pt, ds_key);
    int t0;
    if (ds_key_used) n_key_reuse++;
    ds_start = 1'b1; ds_data_in = pt;
    @(posedge clk); #1; t0 = cycles;
    ds_start = 1'b0; ds_data_in = rand_blk();
    for (int c = 1; c < 6; c++) begin
      check_true(!ds_data_valid, {what, ": ds data_valid early"});
      if (noisy && c == 2) begin ds_start = 1'b1; n_busy_start++; end
      @(posedge clk); #1;
      ds_start = 1'b0;
    end
    check_true(ds_data_valid, {what, ": ds data_valid after 6 cycles"});
    check_true(cycles - t0 + 1 == 6, {what, ": ds latency"});
    check(ds_data_out, exp, {what, ": ds ciphertext"});
    ds_key_used = 1'b1;
    n_encryptions++;
  endtask

  // One stream of random traffic per core, all three at once. Every
  // encryption after the first of a stream starts in the previous
  // data_valid cycle.
  task automatic traffic(int ops);
    fork
      begin
        for (int n = 0; n < ops; n++) begin
          std_encrypt(rand_blk(), rand_blk(), ($urandom % 4) == 0, $sformatf("std op %0d", n));
          if (n > 0) n_back_to_back++;
        end
        @(posedge clk); #1;
        check_true(!std_data_valid, "std data_valid longer than one cycle");
      end
      begin
        for (int n = 0; n < ops; n++) begin
          case ($urandom % 6)
            0:       hk_store(rand_blk(), 1'b0);
            1:       hk_store(rand_blk(), 1'b1);
            default: ;
          endcase
          hk_encrypt(rand_blk(), ($urandom % 4) == 0, $sformatf("hk op %0d", n));
        end
        @(posedge clk); #1;
      end
      begin
        for (int n = 0; n < ops; n++) begin
          case ($urandom % 6)
            0:       ds_store(rand_blk(), 1'b0);
            1:       ds_store(rand_blk(), 1'b1);
            default: ;
          endcase
          ds_encrypt(rand_blk(), ($urandom % 4) == 0, $sformatf("ds op %0d", n));
        end
        @(posedge clk); #1;
      end
    join
  endtask

  initial begin
    std_start = 0; std_key_in = '0; std_data_in = '0;
    hk_start = 0; ds_start = 0; hk_data_in = '0; ds_data_in = '0;
    hk_key_used = 0; ds_key_used = 0;

    // Power-up reset with store_key: both key stores cleared.
    rst = 1'b1; hk_store_key = 1'b1; ds_store_key = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0; hk_store_key = 1'b0; ds_store_key = 1'b0;
    hk_key = '0; ds_key = '0;
    hk_encrypt(128'h00112233445566778899aabbccddeeff, 1'b0, "hk cleared key");
    ds_encrypt(128'h00112233445566778899aabbccddeeff, 1'b0, "ds cleared key");
    n_reset_clears++;

    // Known answers.
    std_encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 1'b0, "std C.1");
    check(std_data_out, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "std C.1 known answer");
    hk_store(128'h2b7e151628aed2a6abf7158809cf4f3c, 1'b0);
    hk_encrypt(128'h3243f6a8885a308d313198a2e0370734, 1'b0, "hk App. B");
    check(hk_data_out, 128'h3925841d02dc09fbdc118597196a0b32, "hk App. B known answer");
    ds_store(128'h2b7e151628aed2a6abf7158809cf4f3c, 1'b0);
    ds_encrypt(128'h3243f6a8885a308d313198a2e0370734, 1'b0, "ds App. B");
    check(ds_data_out, 128'h3925841d02dc09fbdc118597196a0b32, "ds App. B known answer");

    traffic(40);

    // Reset without store_key: stored keys survive.
    @(posedge clk); #1 rst = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    hk_encrypt(rand_blk(), 1'b0, "hk after reset");
    ds_encrypt(rand_blk(), 1'b0, "ds after reset");
    n_reset_keeps++;

    // Reset with store_key again clears them.
    @(posedge clk); #1 rst = 1'b1; hk_store_key = 1'b1; ds_store_key = 1'b1;
    @(posedge clk); #1 rst = 1'b0; hk_store_key = 1'b0; ds_store_key = 1'b0;
    hk_key = '0; ds_key = '0; hk_key_used = 0; ds_key_used = 0;
    hk_encrypt(rand_blk(), 1'b0, "hk after clearing reset");
    ds_encrypt(rand_blk(), 1'b0, "ds after clearing reset");
    n_reset_clears++;

    traffic(20);

    $display("mechanisms: encryptions=%0d bypass std/hk/ds=%0d/%0d/%0d back_to_back=%0d busy_start_ignored=%0d",
             n_encryptions, n_bypass_std, n_bypass_hk, n_bypass_ds, n_back_to_back, n_busy_start);
    $display("            key_store=%0d key_reuse=%0d store_over_start=%0d reset_keeps=%0d reset_clears=%0d",
             n_key_store, n_key_reuse, n_store_priority, n_reset_keeps, n_reset_clears);
    check_true(n_bypass_std > 0, "std final-round bypass never used");
    check_true(n_bypass_hk > 0,  "hk final-round bypass never used");
    check_true(n_bypass_ds > 0,  "ds final-round bypass never used");
    check_true(n_odd_bypass_used == 0, "ds odd-round bypass must stay tied off");
    check_true(n_back_to_back > 0, "no back-to-back start");
    check_true(n_busy_start > 0, "no start while busy");
    check_true(n_key_store > 0, "no key store");
    check_true(n_key_reuse > 0, "no stored-key reuse");
    check_true(n_store_priority > 0, "no start together with store_key");
    check_true(n_reset_keeps > 0, "no reset keeping the key");
    check_true(n_reset_clears > 0, "no reset clearing the key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
