// aes_xtime_tb: checks the multiply-by-two block for all 256 inputs against
// a generic GF(2^8) multiplier, plus the known products 57*2 = AE and
// AE*2 = 47 (reduction case).
module aes_xtime_tb;
  import aes_ref_pkg::*;
  logic [7:0] i, o;
  int checks = 0, failures = 0;

  aes_xtime dut (.i, .o);

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
    i = 8'h57; #1; check(o, 8'hAE, "57*2");
    i = 8'hAE; #1; check(o, 8'h47, "AE*2");
    for (int x = 0; x < 256; x++) begin
      i = 8'(x); #1;
      check(o, ref_mul(8'(x), 8'h02), $sformatf("x=%02h", x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
