// aes_power_top: the three AES-128 encryption cores side by side.
//
// The cores are alternatives that trade pins, key handling and speed against
// power: aes_standard (separate key and data busses, 11 cycles),
// aes_hard_key (one shared bus plus a stored key, 11 cycles) and
// aes_dual_stage (stored key, two rounds per clock, 6 cycles). They share
// only clk and rst here; every other pin of each core is brought out with a
// std_, hk_ or ds_ prefix. Byte 0 of every 128-bit block is bits [127:120].
module aes_power_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  // Standard core
  input  logic   std_start,
  input  block_t std_key_in,
  input  block_t std_data_in,
  output block_t std_data_out,
  output logic   std_data_valid,
  // Hard Key core
  input  logic   hk_start,
  input  logic   hk_store_key,
  input  block_t hk_data_in,
  output block_t hk_data_out,
  output logic   hk_data_valid,
  // Dual Stage core
  input  logic   ds_start,
  input  logic   ds_store_key,
  input  block_t ds_data_in,
  output block_t ds_data_out,
  output logic   ds_data_valid
);
  aes_standard u_standard (
    .clk, .rst, .start(std_start), .key_in(std_key_in), .data_in(std_data_in),
    .data_out(std_data_out), .data_valid(std_data_valid)
  );

  aes_hard_key u_hard_key (
    .clk, .rst, .start(hk_start), .store_key(hk_store_key), .data_in(hk_data_in),
    .data_out(hk_data_out), .data_valid(hk_data_valid)
  );

  aes_dual_stage u_dual_stage (
    .clk, .rst, .start(ds_start), .store_key(ds_store_key), .data_in(ds_data_in),
    .data_out(ds_data_out), .data_valid(ds_data_valid)
  );
endmodule
