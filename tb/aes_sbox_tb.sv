// aes_sbox_tb: checks all 256 S-box entries against the published S-box
// table (tb/sbox_table.hex, row = high nibble, column = low nibble) and
// against the reference model's inverse-plus-affine computation.
module aes_sbox_tb;
  import aes_ref_pkg::*;
  logic [7:0] in_byte, out_byte;
  logic [7:0] table_mem [256];
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte, .out_byte);

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
    $readmemh("tb/sbox_table.hex", table_mem);
    for (int x = 0; x < 256; x++) begin
      in_byte = 8'(x); #1;
      check(out_byte, table_mem[x], $sformatf("table x=%02h", x));
      check(out_byte, ref_sbox(8'(x)), $sformatf("model x=%02h", x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
