// misr: multiple-input signature register with diagnosis gating.
//
// An N-bit internal-XOR signature register, one input per scan chain.  On each
// enabled clock
//     s[0] <= in[0] ^ f[0]
//     s[i] <= in[i] ^ s[i-1] ^ f[i]          (i = 1 .. N-1)
// where f[i] is the feedback from the last stage, s[N-1], into every stage whose
// polynomial coefficient POLY[i] is 1.  Stage N-1 is the serial output so.
//
// Each feedback input of an XOR gate passes through a 2-input multiplexer
// whose other input is constant 0, selected by the test signal d.  With d = 0
// the register is an ordinary MISR.  With d = 1 all feedback is 0 and the
// register becomes a plain shift register with the chain inputs XORed in:
// if only chain k is non-zero (the other chains are blocked by chain_select)
// its bits enter stage k and leave on so, unmodified, N-1-k clocks later.
// The polynomial, the Galois form and the stage order are own choices; the
// gating of the feedback inputs to 0 by d follows the reference architecture.
//
// clear (synchronous, wins over everything) empties the register at session
// start.  unload (wins over en) shifts the finished signature out serially:
// every stage takes the one below it, stage 0 takes 0, and inputs and feedback
// are ignored, so so shows sig[N-1], sig[N-2], ... on successive clocks.
// The unload path is this design's own; the published architecture only says
// that the signature leaves through a serial output.
module misr
  import bist_pkg::*;
#(
  parameter int unsigned  N    = DEF_CHAINS,
  parameter logic [N-1:0] POLY = DEF_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic         unload,   // shift the signature out on so
  input  logic         d,        // 1: feedback muxes select constant 0
  input  logic [N-1:0] in,
  output logic [N-1:0] sig,
  output logic         so
);

  logic [N-1:0] fb;    // feedback input of each XOR, after its multiplexer
  logic [N-1:0] nxt;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      fb[i] = (POLY[i] && !d) ? sig[N-1] : 1'b0;
    end
    nxt = in ^ {sig[N-2:0], 1'b0} ^ fb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear)  sig <= '0;
    else if (unload) sig <= {sig[N-2:0], 1'b0};
    else if (en)     sig <= nxt;
  end

  assign so = sig[N-1];

endmodule
