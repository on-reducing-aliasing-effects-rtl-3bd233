// lbist_diag_top: logic BIST with single-chain diagnosis.
//
// N scan chains of L flip-flops are loaded in parallel from an N-bit PRPG
// (one generator bit per chain) and unloaded into an N-bit MISR (one MISR
// input per chain).  Two additions make a failing session diagnosable:
//   * chain_select puts a 2-input multiplexer (other input 0) on every chain's
//     scan-out, driven by a one-hot state machine of N flip-flops.  In the
//     all-0 reset state every chain reaches the MISR (normal BIST); in a
//     one-hot state only the selected chain does.
//   * the MISR's feedback inputs pass through multiplexers to constant 0,
//     selected by the test signal diag_d.  With diag_d = 1 the selected chain's
//     captured bits leave misr_so unmodified, chain k (0-based) N-1-k+1 clocks
//     after they leave the chain, so they can be compared bit by bit with the
//     expected responses to find the first failing vector and the failing cells.
// With the state machine cleared and diag_d = 0 the added logic is transparent.
// After a session the signature can be compared on chip (pass) or shifted out
// on misr_so with sig_unload.
//
// The logic under test is outside this module: scan_cells shows the contents
// of all scan cells and cut_resp is the response they load on the system clock
// (capture_en high).  Chain i cell j is scan_cells[i][j]; cell 0 is next to the
// scan-in, cell L-1 drives the scan-out.
// Session timing: see lbist_controller (L + V*(L+1) + N-1 clocks from start
// to done).  Diagnosis controls (diag_clear, diag_step, diag_d) should be held
// steady during a session.
module lbist_diag_top
  import bist_pkg::*;
#(
  parameter int unsigned  N           = DEF_CHAINS,
  parameter int unsigned  L           = DEF_CHAIN_LEN,
  parameter int unsigned  MAX_VECTORS = DEF_MAX_VECTORS,
  parameter logic [N-1:0] POLY        = DEF_POLY,
  parameter logic [N-1:0] SEED        = DEF_SEED,
  localparam int unsigned VW = $clog2(MAX_VECTORS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // session control
  input  logic                start,
  input  logic [VW-1:0]       num_vectors,
  input  logic [N-1:0]        expected_sig,
  input  logic                sig_unload,   // in DONE: shift the signature out on misr_so
  output logic                busy,
  output logic                done,
  output logic                pass,
  output logic [VW-1:0]       vec_count,
  // diagnosis control
  input  logic                diag_clear,   // one-hot FSM to all-0 (normal mode)
  input  logic                diag_step,    // one-hot FSM to the next chain
  input  logic                diag_d,       // test signal D: MISR feedback to 0
  output logic [N-1:0]        diag_state,
  output logic                diag_mode,    // FSM in a one-hot (diagnosis) state
  output bist_state_e         bist_phase,   // controller phase
  // signature
  output logic [N-1:0]        signature,
  output logic                misr_so,
  // logic under test
  output logic                capture_en,
  output logic [N-1:0][L-1:0] scan_cells,
  input  logic [N-1:0][L-1:0] cut_resp
);

  logic         scan_en, prpg_en, prpg_seed, misr_en, misr_clear, misr_unload;
  logic [N-1:0] prpg_q, scan_out, chain_pass, misr_in;

  lbist_controller #(.N(N), .L(L), .MAX_VECTORS(MAX_VECTORS)) u_ctrl (
    .clk, .rst_n, .start, .num_vectors,
    .signature, .expected_sig, .sig_unload,
    .scan_en, .capture_en, .prpg_en, .prpg_seed, .misr_en, .misr_clear, .misr_unload,
    .busy, .done, .pass, .vec_count, .state(bist_phase)
  );

  prpg #(.N(N), .POLY(POLY), .SEED(SEED)) u_prpg (
    .clk, .rst_n, .load_seed(prpg_seed), .en(prpg_en), .q(prpg_q)
  );

  for (genvar i = 0; i < N; i++) begin : g_chain
    scan_chain #(.L(L)) u_chain (
      .clk, .se(scan_en), .ce(capture_en), .si(prpg_q[i]),
      .d(cut_resp[i]), .q(scan_cells[i]), .so(scan_out[i])
    );
  end

  onehot_fsm #(.N(N)) u_fsm (
    .clk, .rst_n, .clear(diag_clear), .step(diag_step),
    .state(diag_state), .chain_pass, .diag_mode
  );

  chain_select #(.N(N)) u_sel (
    .scan_out, .pass(chain_pass), .misr_in
  );

  misr #(.N(N), .POLY(POLY)) u_misr (
    .clk, .rst_n, .clear(misr_clear), .en(misr_en), .unload(misr_unload), .d(diag_d),
    .in(misr_in), .sig(signature), .so(misr_so)
  );

  // The chain selection and D must not change while a session runs: the
  // serial stream would then mix two chains or two MISR modes.
  a_diag_stable : assert property (@(posedge clk) disable iff (!rst_n)
      busy |-> !diag_step && !diag_clear && $stable(diag_d))
    else $error("lbist_diag_top: diagnosis controls changed during a session");

endmodule
