// aes_sub_bytes_tb: checks the 16-wide SubBytes stage with the known state
// 193de3be... -> d42711ae... and with random states against the reference.
module aes_sub_bytes_tb;
  import aes_ref_pkg::*;
  logic [127:0] si, so;
  int checks = 0, failures = 0;

  aes_sub_bytes dut (.state_in(si), .state_out(so));

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
    si = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    check(so, 128'hd42711aee0bf98f1b8b45de51e415230, "known state");
    for (int n = 0; n < 300; n++) begin
      si = rand_blk(); #1;
      check(so, ref_sub_bytes(si), $sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
