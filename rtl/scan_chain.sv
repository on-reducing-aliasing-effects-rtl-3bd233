// scan_chain: one mux-D scan chain of L flip-flops.
//
// With se high the chain shifts by one position per clock: si enters cell 0
// and cell L-1 drives so, the scan-out that goes to the chain-select
// multiplexer in front of the MISR.  With ce high (the single system clock of
// a BIST vector) every cell loads its functional input d[i], which is the
// response of the logic under test.  Otherwise the chain holds.  se wins over ce.
// These cells are the design's own functional flip-flops, so they have no reset;
// the BIST controller never compacts their contents before the first capture.
// The cell ordering (cell 0 at the scan-in end) is an own choice.  L >= 2.
module scan_chain #(
  parameter int unsigned L = bist_pkg::DEF_CHAIN_LEN
) (
  input  logic         clk,
  input  logic         se,
  input  logic         ce,
  input  logic         si,
  input  logic [L-1:0] d,
  output logic [L-1:0] q,
  output logic         so
);

  assign so = q[L-1];

  always_ff @(posedge clk) begin
    if (se)      q <= {q[L-2:0], si};
    else if (ce) q <= d;
  end

endmodule
