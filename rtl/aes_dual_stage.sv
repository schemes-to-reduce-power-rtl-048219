// aes_dual_stage: AES-128 encryption core with the shared-bus, stored-key
// interface of aes_hard_key and two rounds per clock.
//
// Two round blocks and two key expansion units are chained: the first pair
// computes the odd-numbered round (1, 3, ..., 9) from the data and key
// registers, and feeds the second pair, which computes the following
// even-numbered round (2, ..., 10); only the second pair's results are
// written back. The first round block's MixColumns bypass is tied off (an
// odd round is never the last); the second block's bypass is driven by the
// control and used in the fifth cycle for round 10. Ten rounds take five
// cycles.
//
// Interface: clk, rst (synchronous, active high), start, store_key,
// data_in[127:0] in; data_out[127:0], data_valid out, with the same key
// storage, reset and priority rules as aes_hard_key. Timing: start in cycle c
// gives a one-cycle data_valid in cycle c+6, data_out holding the ciphertext
// until the next result.
//
// The chaining, the tied-off first bypass and the six-cycle latency follow
// the published design; output register, pulse-form data_valid and
// start/store_key priority are choices of this implementation.
module aes_dual_stage
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
  localparam int unsigned STEPS = NUM_ROUNDS / 2;

  logic       load, busy, last;
  logic [2:0] step;
  block_t     stored_key, data_reg, key_reg;
  block_t     key_odd, key_even, state_odd, state_even;

  aes_key_storage u_kstore (.clk, .rst, .store_key, .data_in, .key(stored_key));

  aes_ctrl #(.STEPS(STEPS)) u_ctrl (
    .clk, .rst, .start(start && !store_key), .load, .busy, .step, .last, .data_valid
  );

  // Step s computes rounds 2s-1 and 2s.
  aes_key_expansion u_kexp_odd  (.key_in(key_reg), .rcon(round_constant(2*int'(step) - 1)), .key_out(key_odd));
  aes_key_expansion u_kexp_even (.key_in(key_odd), .rcon(round_constant(2*int'(step))),     .key_out(key_even));

  aes_round u_round_odd (
    .state_in(data_reg), .round_key(key_odd), .final_round(1'b0), .state_out(state_odd)
  );
  aes_round u_round_even (
    .state_in(state_odd), .round_key(key_even), .final_round(last), .state_out(state_even)
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
        data_reg <= state_even;
        key_reg  <= key_even;
      end
      if (last) data_out <= state_even;
    end
  end
endmodule
