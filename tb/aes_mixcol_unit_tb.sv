// aes_mixcol_unit_tb: checks one MixColumns output byte, y = 2a^3b^c^d, for
// random inputs against a generic GF(2^8) multiplier, and for the first byte
// of the known column db 13 53 45 -> 8e.
module aes_mixcol_unit_tb;
  import aes_ref_pkg::*;
  logic [7:0] a, b, c, d, y;
  int checks = 0, failures = 0;

  aes_mixcol_unit dut (.a, .b, .c, .d, .y);

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
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
    {a, b, c, d} = 32'hdb135345; #1; check(y, 8'h8e, "db135345");
    for (int n = 0; n < 2000; n++) begin
      {a, b, c, d} = $urandom; #1;
      check(y, ref_mul(a, 8'h02) ^ ref_mul(b, 8'h03) ^ c ^ d, $sformatf("%02h %02h %02h %02h", a, b, c, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
