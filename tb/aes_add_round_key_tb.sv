// aes_add_round_key_tb: checks AddRoundKey with a known state/key pair and
// random pairs against a bitwise XOR computed here.
module aes_add_round_key_tb;
  import aes_ref_pkg::*;
  logic [127:0] si, rk, so;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.state_in(si), .round_key(rk), .state_out(so));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
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
    si = 128'h3243f6a8885a308d313198a2e0370734;
    rk = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    check(so, 128'h193de3bea0f4e22b9ac68d2ae9f84808, "known pair");
    for (int n = 0; n < 300; n++) begin
      si = rand_blk(); rk = rand_blk(); #1;
      for (int k = 0; k < 128; k++) begin
        checks++;
        if (so[k] !== (si[k] != rk[k])) begin
          failures++;
          $display("FAIL random %0d bit %0d", n, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
