// aes_vectors300_tb: the verification workload, 300 random key/plaintext
// pairs through each of the three cores at default sizes, all three running
// at once from one clock. Every pair has its own key, as in a random-vector
// known-answer file, so the shared-bus cores store the key (one cycle) before
// each start. Ciphertexts are compared with the reference model and the
// sustained rate is measured: the Standard core starts a new block in every
// data_valid cycle (11 cycles per block), the Hard Key core needs 1 + 11 and
// the Dual Stage core 1 + 6 cycles per block with a new key each time.
module aes_vectors300_tb;
  import aes_ref_pkg::*;
  localparam int N = 300;

  logic         clk = 0, rst;
  logic         std_start, std_data_valid;
  logic [127:0] std_key_in, std_data_in, std_data_out;
  logic         hk_start, hk_store_key, hk_data_valid;
  logic [127:0] hk_data_in, hk_data_out;
  logic         ds_start, ds_store_key, ds_data_valid;
  logic [127:0] ds_data_in, ds_data_out;

  logic [127:0] keys [N], pts [N], cts [N];
  int checks = 0, failures = 0, cycles = 0;

  aes_power_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic check_rate(string core, int t_start, int t_end, int per_block);
    checks++;
    $display("%s: %0d blocks in %0d cycles (%0d per block)", core, N, t_end - t_start, per_block);
    if (t_end - t_start != N * per_block) begin
      failures++;
      $display("FAIL %s rate: %0d cycles, expected %0d", core, t_end - t_start, N * per_block);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      keys[i] = rand_blk();
      pts[i]  = rand_blk();
      cts[i]  = ref_encrypt(pts[i], keys[i]);
    end
    std_start = 0; hk_start = 0; ds_start = 0;
    hk_store_key = 1; ds_store_key = 1;
    std_key_in = '0; std_data_in = '0; hk_data_in = '0; ds_data_in = '0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0; hk_store_key = 0; ds_store_key = 0;

    fork
      begin : std_stream
        int t0;
        t0 = cycles;
        for (int i = 0; i < N; i++) begin
          std_start = 1'b1; std_key_in = keys[i]; std_data_in = pts[i];
          @(posedge clk); #1; std_start = 1'b0;
          while (!std_data_valid) begin @(posedge clk); #1; end
          check(std_data_out, cts[i], $sformatf("std vector %0d", i));
        end
        check_rate("standard", t0, cycles, 11);
      end
      begin : hk_stream
        int t0;
        t0 = cycles;
        for (int i = 0; i < N; i++) begin
          hk_store_key = 1'b1; hk_data_in = keys[i];
          @(posedge clk); #1; hk_store_key = 1'b0;
          hk_start = 1'b1; hk_data_in = pts[i];
          @(posedge clk); #1; hk_start = 1'b0;
          while (!hk_data_valid) begin @(posedge clk); #1; end
          check(hk_data_out, cts[i], $sformatf("hk vector %0d", i));
        end
        check_rate("hard key", t0, cycles, 12);
      end
      begin : ds_stream
        int t0;
        t0 = cycles;
        for (int i = 0; i < N; i++) begin
          ds_store_key = 1'b1; ds_data_in = keys[i];
          @(posedge clk); #1; ds_store_key = 1'b0;
          ds_start = 1'b1; ds_data_in = pts[i];
          @(posedge clk); #1; ds_start = 1'b0;
          while (!ds_data_valid) begin @(posedge clk); #1; end
          check(ds_data_out, cts[i], $sformatf("ds vector %0d", i));
        end
        check_rate("dual stage", t0, cycles, 7);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
