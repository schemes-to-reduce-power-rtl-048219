// aes_ctrl: sequencing for the iterative AES-128 cores.
//
// A start request in an idle cycle raises `load` for that cycle; the core
// then loads its data and key registers on the clock edge. The following
// STEPS cycles each perform one register update of the round datapath
// (`busy`, `step` = 1..STEPS); `last` marks the final one, in which the core
// bypasses MixColumns and captures its output. `data_valid` is a registered
// one-cycle pulse in the cycle after `last`, so with start seen in cycle c the
// result is valid in cycle c+STEPS+1: 11 cycles for one round per clock
// (STEPS = 10), 6 for two rounds per clock (STEPS = 5). The core is idle again
// in the data_valid cycle and accepts a new start there. Start requests while
// busy are ignored. Reset is synchronous and active high.
module aes_ctrl #(
  parameter int unsigned STEPS = 10,
  localparam int unsigned SW = $clog2(STEPS + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          load,
  output logic          busy,
  output logic [SW-1:0] step,
  output logic          last,
  output logic          data_valid
);
  assign load = start && !busy;
  assign last = busy && (step == SW'(STEPS));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      step       <= '0;
      data_valid <= 1'b0;
    end else begin
      data_valid <= last;
      if (load) begin
        busy <= 1'b1;
        step <= SW'(1);
      end else if (last) begin
        busy <= 1'b0;
        step <= '0;
      end else if (busy) begin
        step <= step + SW'(1);
      end
    end
  end

  // A new encryption never starts while one is running, and the done pulse
  // lasts exactly one cycle.
  a_load_idle:   assert property (@(posedge clk) disable iff (rst) load |-> !busy);
  a_valid_pulse: assert property (@(posedge clk) disable iff (rst) data_valid |=> !data_valid);
endmodule
