// tb_table2_diag: chain-by-chain diagnosis at the full default size.
//
// Reproduces the failure scenarios of the reference experiment: a first
// failing vector of 32, 41, 65, 74 or 100, with 2, 4 or 6 failing scan cells
// that lie in different scan chains (96 chains of 499 cells).  For each of the
// 15 cases the stand-in logic under test inverts the chosen cells at the first
// failing vector and every 7th vector after it.  The test then
//   * runs a normal session up to that vector and checks that it fails,
//   * selects each failing chain, and one chain without failing cells, with the
//     one-hot state machine, sets D, runs the session again and compares the
//     serial signature output bit by bit with the fault-free expectation,
//   * checks that the first mismatch names the right vector and exactly the
//     injected cell of that chain, and that the clean chain shows nothing.
// Chains and cells are drawn from a fixed pseudo-random sequence.
module tb_table2_diag;
  import bist_pkg::*;
  import lbist_ref_pkg::*;

  localparam int N = DEF_CHAINS, L = DEF_CHAIN_LEN;
  localparam int VW = $clog2(DEF_MAX_VECTORS + 1);
  typedef lbist_ref #(N, L) ref_t;
  typedef ref_t::cells_t cells_t;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [VW-1:0] num_vectors = '0, vec_count;
  logic [N-1:0] expected_sig = '0, diag_state, signature;
  logic busy, done, pass, diag_clear = 1'b0, diag_step = 1'b0, diag_d = 1'b0, diag_mode, misr_so;
  logic capture_en;
  logic sig_unload = 1'b0;
  bist_state_e bist_phase;
  cells_t scan_cells, cut_resp;

  cells_t fmask = '0;
  int ffirst = 0, cap_count = 0;
  localparam int FPERIOD = 7;
  int checks = 0, failures = 0;
  int n_found = 0, n_clean = 0, n_fail_sessions = 0;
  bit dut_q[$];
  bit new_q[$];   // the recorded clock was a shift clock, so misr_so holds a new bit

  ref_t rf = new(DEF_POLY, DEF_SEED);

  always #5 clk = ~clk;

  lbist_diag_top dut (.*);

  // The response is formed in the capture cycle, when the scan cells are
  // stable, so the stand-in logic is evaluated once per vector.
  always @(negedge clk) begin
    if (bist_phase == ST_CAPTURE) cut_resp <= ref_t::resp(scan_cells, cap_count + 1, fmask, ffirst, FPERIOD);
  end
  always_ff @(posedge clk) if (capture_en) cap_count <= cap_count + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dut_session(int nvec, int len);
    bit is_shift;
    dut_q.delete();
    @(negedge clk);
    num_vectors = VW'(nvec);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cap_count = 0;
    new_q.delete();
    for (int c = 0; c < len; c++) begin
      is_shift = (bist_phase == ST_SHIFT);
      @(negedge clk);
      dut_q.push_back(misr_so);
      new_q.push_back(is_shift);
    end
    check(done, $sformatf("done after %0d clocks", len));
  endtask

  task automatic select_chain(int k);
    @(negedge clk);
    diag_clear = 1'b1;
    @(negedge clk);
    diag_clear = 1'b0;
    for (int i = 0; i <= k; i++) begin
      diag_step = 1'b1;
      @(negedge clk);
    end
    diag_step = 1'b0;
    check(diag_state == N'(1) << k, $sformatf("FSM selects chain %0d", k));
  endtask

  task automatic diagnose(int k, int nvec, output int first_vec, output int cells[$]);
    bit good_q[$];
    int tv[$], tcell[$];
    cells_t none = '0;
    select_chain(k);
    diag_d = 1'b1;
    rf.run(nvec, k, 1'b1, none, 0, 0, 1'b1);
    good_q = rf.so_q;
    tv = rf.tag_vec_q;
    tcell = rf.tag_cell_q;
    dut_session(nvec, rf.length);
    first_vec = -1;
    cells.delete();
    foreach (dut_q[i]) begin
      if (new_q[i] && dut_q[i] != good_q[i]) begin
        check(tv[i] > 0, "mismatch maps to a response bit");
        if (first_vec < 0 || tv[i] < first_vec) begin
          first_vec = tv[i];
          cells.delete();
        end
        if (tv[i] == first_vec) cells.push_back(tcell[i]);
      end
    end
  endtask

  initial begin
    int fvecs[5] = '{32, 41, 65, 74, 100};
    int ncells[3] = '{2, 4, 6};
    int chain_of[6], cell_of[6];
    int clean, fv;
    int cl[$];
    bit used[N];
    cells_t none = '0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    void'($urandom(1234));
    foreach (fvecs[a]) begin
      foreach (ncells[b]) begin
        // pick distinct chains and a cell in each
        foreach (used[i]) used[i] = 1'b0;
        fmask = '0;
        for (int j = 0; j < ncells[b]; j++) begin
          do chain_of[j] = $urandom_range(N - 1); while (used[chain_of[j]]);
          used[chain_of[j]] = 1'b1;
          cell_of[j] = $urandom_range(L - 1);
          fmask[chain_of[j]][cell_of[j]] = 1'b1;
        end
        do clean = $urandom_range(N - 1); while (used[clean]);
        ffirst = fvecs[a];
        // normal session must fail
        diag_clear = 1'b1;
        diag_d = 1'b0;
        @(negedge clk);
        diag_clear = 1'b0;
        rf.run(ffirst, -1, 1'b0, none, 0, 0, 1'b0);
        expected_sig = rf.final_sig;
        dut_session(ffirst, rf.length);
        check(!pass, $sformatf("vector %0d, %0d cells: normal session fails", ffirst, ncells[b]));
        if (!pass) n_fail_sessions++;
        // diagnose chain by chain
        for (int j = 0; j < ncells[b]; j++) begin
          diagnose(chain_of[j], ffirst, fv, cl);
          check(fv == ffirst && cl.size() == 1 && cl[0] == cell_of[j],
                $sformatf("chain %0d: found vector %0d (%0d cells), injected vector %0d cell %0d",
                          chain_of[j], fv, cl.size(), ffirst, cell_of[j]));
          if (fv == ffirst) n_found++;
        end
        diagnose(clean, ffirst, fv, cl);
        check(fv < 0, $sformatf("clean chain %0d shows no mismatch", clean));
        if (fv < 0) n_clean++;
        $display("failing vector %0d with %0d failing cells: diagnosed", ffirst, ncells[b]);
      end
    end
    check(n_fail_sessions == 15 && n_found == 60 && n_clean == 15, "all cases diagnosed");
    $display("failing sessions %0d, failing chains located %0d, clean chains %0d",
             n_fail_sessions, n_found, n_clean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
