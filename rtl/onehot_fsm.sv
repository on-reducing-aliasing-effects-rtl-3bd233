// onehot_fsm: selects the scan chain under diagnosis.
//
// A state machine with one flip-flop per scan chain.  Its reset state is
// all-0, which is normal operation: every chain reaches the MISR.  Its legal
// diagnosis states are one-hot; state bit i set means chain i alone is shifted
// through the MISR.  From the reset state a step enters the first legal state
// (chain 0); further steps move the one-hot bit to the next chain and wrap from
// the last chain to the first.  clear returns to the all-0 state.
// The step/clear controls and the ordering of the legal states are own
// choices: the reference only requires that the machine can be placed in the
// all-0 state and moved into each of its legal states in turn.
//
// Outputs (all registered or decoded from the registers):
//   state      the flip-flops themselves
//   chain_pass bit i high when chain i may reach the MISR: every bit in the
//              all-0 state, only the selected bit in a one-hot state
//   diag_mode  high in a one-hot state
module onehot_fsm
  import bist_pkg::*;
#(
  parameter int unsigned N = DEF_CHAINS
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous, to the all-0 state
  input  logic         clear,   // synchronous, to the all-0 state
  input  logic         step,    // advance to the next legal state
  output logic [N-1:0] state,
  output logic [N-1:0] chain_pass,
  output logic         diag_mode
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               state <= '0;
    else if (clear)           state <= '0;
    else if (step && !diag_mode) state <= N'(1);
    else if (step)            state <= {state[N-2:0], state[N-1]};
  end

  assign diag_mode  = |state;
  assign chain_pass = diag_mode ? state : '1;

  a_onehot0 : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(state))
    else $error("onehot_fsm: state %h is not one-hot or zero", state);

endmodule
