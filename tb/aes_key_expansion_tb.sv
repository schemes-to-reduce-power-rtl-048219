// aes_key_expansion_tb: steps the key expansion unit through all ten rounds
// of the FIPS-197 key 2b7e1516... with the round constants 01..36 and checks
// rounds 1 and 10 against the published round keys and every round against
// the reference schedule; then does the same for random keys.
module aes_key_expansion_tb;
  import aes_ref_pkg::*;
  logic [127:0] ki, ko;
  logic [7:0]   rc;
  int checks = 0, failures = 0;
  logic [7:0] rcons [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1B, 8'h36};

  aes_key_expansion dut (.key_in(ki), .rcon(rc), .key_out(ko));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic run_key(logic [127:0] key, bit known);
    ki = key;
    for (int r = 1; r <= 10; r++) begin
      rc = rcons[r-1]; #1;
      check(ko, ref_round_key(key, r), $sformatf("key %032h round %0d", key, r));
      if (known && r == 1)  check(ko, 128'ha0fafe1788542cb123a339392a6c7605, "FIPS round 1");
      if (known && r == 10) check(ko, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS round 10");
      ki = ko;
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 1'b1);
    for (int n = 0; n < 30; n++) run_key(rand_blk(), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
