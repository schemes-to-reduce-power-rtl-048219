// aes_standard: AES-128 encryption core with separate 128-bit key and data
// busses, one round per clock.
//
// Datapath: a data (state) register and a key register, each behind a 2:1
// multiplexer. When start is seen in an idle cycle, the data register loads
// data_in ^ key_in (the initial AddRoundKey) and the key register loads
// key_in. In each of the next ten cycles the key expansion unit turns the
// key register into the next round key, the round block applies one round to
// the data register with that key, and both results are written back. In the
// tenth cycle the round block bypasses MixColumns (the final AES round) and
// the result is captured in the output register.
//
// Interface: clk, rst (synchronous, active high), start, key_in[127:0],
// data_in[127:0] in; data_out[127:0], data_valid out. Byte 0 of a block is
// bits [127:120]. key_in and data_in are sampled in the start cycle only.
// Timing: start in cycle c gives data_valid = 1 for one cycle in cycle c+11,
// with data_out holding the ciphertext from then until the next result. The
// core accepts a new start in the data_valid cycle; start while busy is
// ignored.
//
// The register/multiplexer arrangement, the round block with its
// final-round bypass and the 11-cycle latency follow the published
// architecture. The output register, the pulse form of data_valid and the
// synchronous reset are choices of this implementation.
module aes_standard
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  block_t key_in,
  input  block_t data_in,
  output block_t data_out,
  output logic   data_valid
);
  logic       load, busy, last;
  logic [3:0] step;
  block_t     data_reg, key_reg, round_key, round_out;

  aes_ctrl #(.STEPS(NUM_ROUNDS)) u_ctrl (
    .clk, .rst, .start, .load, .busy, .step, .last, .data_valid
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
        data_reg <= data_in ^ key_in;
        key_reg  <= key_in;
      end else if (busy) begin
        data_reg <= round_out;
        key_reg  <= round_key;
      end
      if (last) data_out <= round_out;
    end
  end
endmodule
