// aes_round_tb: checks one full round with the FIPS-197 example (round 1:
// 193de3be... with key a0fafe17... -> a49c7ff2...), and random states and
// keys in normal and final (MixColumns bypassed) mode against the reference.
module aes_round_tb;
  import aes_ref_pkg::*;
  logic [127:0] si, rk, so;
  logic         fin;
  int checks = 0, failures = 0;

  aes_round dut (.state_in(si), .round_key(rk), .final_round(fin), .state_out(so));

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
    si = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk = 128'ha0fafe1788542cb123a339392a6c7605;
    fin = 1'b0; #1;
    check(so, 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS-197 round 1");
    fin = 1'b1; #1;
    check(so, ref_shift_rows(ref_sub_bytes(si)) ^ rk, "round 1 bypassed");
    for (int n = 0; n < 300; n++) begin
      si = rand_blk(); rk = rand_blk(); fin = n[0]; #1;
      check(so, ref_round(si, rk, fin), $sformatf("random %0d final=%0d", n, fin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
