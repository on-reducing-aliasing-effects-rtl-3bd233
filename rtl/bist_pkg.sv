// bist_pkg: constants and types shared by the logic BIST blocks.
//
// The reference configuration has 96 scan chains of at most 499 flip-flops and
// runs sessions of up to 16K BIST vectors.  The pattern generator and the MISR
// have one bit per scan chain.  Their feedback polynomial is not part of the
// reference data; this design uses x^96 + x^94 + x^49 + x^47 + 1, a primitive
// polynomial from the common maximal-length LFSR tables.  A polynomial is held
// as an N-bit vector: bit i is the coefficient of x^i (i = 0 .. N-1); the x^N
// term is implied.
package bist_pkg;

  localparam int unsigned DEF_CHAINS      = 96;    // scan chains = PRPG bits = MISR bits
  localparam int unsigned DEF_CHAIN_LEN   = 499;   // flip-flops in the longest chain
  localparam int unsigned DEF_MAX_VECTORS = 16384; // 16K vectors per session

  // x^96 + x^94 + x^49 + x^47 + 1
  localparam logic [DEF_CHAINS-1:0] DEF_POLY =
      (96'd1 << 94) | (96'd1 << 49) | (96'd1 << 47) | 96'd1;

  // Non-zero PRPG seed (own choice).
  localparam logic [DEF_CHAINS-1:0] DEF_SEED = 96'h1;

  // Phases of a BIST session.
  typedef enum logic [2:0] {
    ST_IDLE,     // waiting for start
    ST_LOAD,     // first scan load, nothing compacted
    ST_CAPTURE,  // one system clock: chains capture the circuit response
    ST_SHIFT,    // shift-out through the MISR, overlapped with the next load
    ST_DONE      // signature final and compared
  } bist_state_e;

endpackage
