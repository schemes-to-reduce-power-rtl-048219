// aes_mix_columns_tb: checks the 128-bit MixColumns stage with the known
// columns db135345 -> 8e4da1bc and f20a225c -> 9fdc589d, the identity on a
// column of equal bytes, and random states against the reference model.
module aes_mix_columns_tb;
  import aes_ref_pkg::*;
  logic [127:0] si, so;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.state_in(si), .state_out(so));

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
    si = 128'hdb135345_f20a225c_01010101_c6c6c6c6; #1;
    check(so, 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6, "known columns");
    for (int n = 0; n < 500; n++) begin
      si = rand_blk(); #1;
      check(so, ref_mix_columns(si), $sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
