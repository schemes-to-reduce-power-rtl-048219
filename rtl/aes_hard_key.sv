// aes_hard_key: AES-128 encryption core with one shared 128-bit input bus and
// a stored key, one round per clock.
//
// The data bus is steered either into the key storage register (store_key
// high) or, on start, into the initial AddRoundKey with the stored key. A key
// therefore has to be sent only once for any number of encryptions; changing
// it costs one bus cycle. Reset keeps the stored key unless store_key is also
// high, in which case the key is cleared. Everything after the input stage is
// the same datapath as aes_standard: data and key registers, one round block
// with a final-round MixColumns bypass and one key expansion unit, ten
// rounds in ten cycles.
//
// Interface: clk, rst (synchronous, active high), start, store_key,
// data_in[127:0] in; data_out[127:0], data_valid out. Byte 0 is bits
// [127:120]. If start and store_key are high together, the key is stored and
// start is ignored. Timing: start in cycle c gives a one-cycle data_valid in
// cycle c+11 (11 cycles of work, result in the 12th), data_out holding the
// ciphertext until the next result. store_key during an encryption changes
// the key for later encryptions only.
//
// The shared bus, key storage, reset rule and timing follow the published
// design; the start/store_key priority, output register and pulse-form
// data_valid are choices of this implementation.
module aes_hard_key
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  logic   store_key,
  input  block_t data_in,
  output block_t data_out,
  output logic   data_valid
);
  logic       load, busy, last;
  logic [3:0] step;
  block_t     stored_key, data_reg, key_reg, round_key, round_out;

  aes_key_storage u_kstore (.clk, .rst, .store_key, .data_in, .key(stored_key));

  aes_ctrl #(.STEPS(NUM_ROUNDS)) u_ctrl (
    .clk, .rst, .start(start && !store_key), .load, .busy, .step, .last, .data_valid
  );

  aes_key_expansion u_kexp (.key_in(key_reg), .rcon(round_constant(int'(step))), .key_out(round_key));

  aes_round u_round (
    .state_in(data_reg), .round_key(round_key), .final_round(last), .state_out(round_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      data_reg <= '0;
      key_reg  <= '0;
      data_out <= '0;
    end else begin
      if (load) begin
        data_reg <= data_in ^ stored_key;
        key_reg  <= stored_key;
      end else if (busy) begin
        data_reg <= round_out;
        key_reg  <= round_key;
      end
      if (last) data_out <= round_out;
    end
  end
endmodule
