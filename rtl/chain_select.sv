// chain_select: the scan-out multiplexers in front of the MISR.
//
// One 2-input multiplexer per scan chain.  One input is the chain's final
// scan-out, the other is tied to constant 0; the select comes from the
// one-hot state machine.  With pass[i] high the chain's bits reach MISR input
// i unchanged, otherwise MISR input i sees 0.  Purely combinational.
module chain_select
  import bist_pkg::*;
#(
  parameter int unsigned N = DEF_CHAINS
) (
  input  logic [N-1:0] scan_out,
  input  logic [N-1:0] pass,
  output logic [N-1:0] misr_in
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      misr_in[i] = pass[i] ? scan_out[i] : 1'b0;
    end
  end

endmodule
