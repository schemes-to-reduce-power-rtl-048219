// aes_shift_rows_tb: checks ShiftRows with a state whose bytes are their own
// indices (so the expected permutation is written out directly), a known
// state d42711ae... -> d4bf5d30..., and random states against the reference.
module aes_shift_rows_tb;
  import aes_ref_pkg::*;
  logic [127:0] si, so;
  int checks = 0, failures = 0;

  aes_shift_rows dut (.state_in(si), .state_out(so));

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
    si = 128'h00010203_04050607_08090a0b_0c0d0e0f; #1;
    check(so, 128'h00050a0f_04090e03_080d0207_0c01060b, "index pattern");
    si = 128'hd42711aee0bf98f1b8b45de51e415230; #1;
    check(so, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "known state");
    for (int n = 0; n < 300; n++) begin
      si = rand_blk(); #1;
      check(so, ref_shift_rows(si), $sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
