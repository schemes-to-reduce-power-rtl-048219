// aes_key_storage_tb: checks that store_key writes the bus into the
// register, that the value holds without store_key, that reset alone keeps
// it, and that reset with store_key clears it.
module aes_key_storage_tb;
  import aes_ref_pkg::*;
  logic         clk = 0, rst, store_key;
  logic [127:0] data_in, key, model;
  int checks = 0, failures = 0, cycles = 0;

  aes_key_storage dut (.clk, .rst, .store_key, .data_in, .key);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic r, logic s, logic [127:0] d);
    rst = r; store_key = s; data_in = d;
    @(posedge clk);
    if (r && s) model = '0;
    else if (!r && s) model = d;
    #1;
    checks++;
    if (key !== model) begin
      failures++;
      $display("FAIL rst=%0b store=%0b: key %032h expected %032h", r, s, key, model);
    end
  endtask

  initial begin
    step(1'b1, 1'b1, rand_blk());            // clear
    step(1'b0, 1'b1, 128'h000102030405060708090a0b0c0d0e0f);
    step(1'b0, 1'b0, rand_blk());            // hold
    step(1'b1, 1'b0, rand_blk());            // reset alone keeps the key
    checks++;
    if (key !== 128'h000102030405060708090a0b0c0d0e0f) begin
      failures++;
      $display("FAIL key lost on reset without store_key");
    end
    step(1'b1, 1'b1, rand_blk());            // reset with store_key clears
    checks++;
    if (key !== '0) begin
      failures++;
      $display("FAIL key not cleared");
    end
    for (int n = 0; n < 400; n++) begin
      logic [1:0] c = 2'($urandom);
      step(c == 0, c != 2, rand_blk());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
