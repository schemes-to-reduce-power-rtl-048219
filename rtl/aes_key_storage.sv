// aes_key_storage: the initial key register of the shared-bus cores.
//
// With store_key high the 128-bit word on the data bus is written into the
// register, so a key sent once serves any number of later encryptions.
// Reset alone keeps the stored key; only reset together with store_key clears
// it, so a system reset does not force the host to send the key again. Both
// actions are synchronous to clk.
module aes_key_storage
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   store_key,
  input  block_t data_in,
  output block_t key
);
  always_ff @(posedge clk) begin
    if (rst) begin
      if (store_key) key <= '0;
    end else if (store_key) begin
      key <= data_in;
    end
  end
endmodule
