// prpg: pseudo-random pattern generator of the logic BIST.
//
// An N-bit linear feedback shift register with one flip-flop per scan chain;
// bit i drives the scan-in of chain i directly (no phase shifter), as in the
// basic BIST architecture where each generator flip-flop feeds one chain.
// It is written in the internal-XOR (Galois) form: on every enabled clock the
// state is multiplied by x modulo the feedback polynomial POLY, so with a
// primitive polynomial it runs through all 2^N-1 non-zero states.
// The polynomial, the seed and the load-seed control are own choices; the
// reference text gives only the generator's width.
//
// Interface: load_seed (synchronous, wins over en) reloads SEED; en advances the
// register by one step; q is the state, valid the cycle after the edge.
// rst_n is an asynchronous active-low reset to SEED.
module prpg
  import bist_pkg::*;
#(
  parameter int unsigned   N    = DEF_CHAINS,
  parameter logic [N-1:0]  POLY = DEF_POLY,
  parameter logic [N-1:0]  SEED = DEF_SEED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_seed,
  input  logic         en,
  output logic [N-1:0] q
);

  logic [N-1:0] nxt;

  always_comb begin
    nxt = {q[N-2:0], 1'b0} ^ (q[N-1] ? POLY : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         q <= SEED;
    else if (load_seed) q <= SEED;
    else if (en)        q <= nxt;
  end

endmodule
