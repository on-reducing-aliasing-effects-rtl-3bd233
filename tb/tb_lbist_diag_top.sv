// tb_lbist_diag_top: end-to-end test of the logic BIST with chain diagnosis.
//
// Runs the whole design at a small size (8 chains of 6 cells) against the
// procedural reference model in lbist_ref_pkg, with a stand-in for the logic
// under test whose fault flips chosen scan cells at chosen vectors.
// Scenarios and the mechanism each one must exercise:
//   normal_pass   fault-free session, signature equals the expected one
//   normal_fail   faulty session, signature differs, pass low
//   diag_session  one-hot FSM selects chain k, D removes MISR feedback; the
//                 serial output is compared bit by bit with the fault-free
//                 expectation, giving the first failing vector and its cells
//   diag_found    a diagnosed chain that holds the injected failing cells
//   diag_clean    a diagnosed chain without failing cells shows no mismatch
//   fsm_wrap      stepping past the last chain returns to chain 0
//   aliasing      two errors cancel in the normal signature (pass stays high)
//   alias_solved  the same two errors found by diagnosing their chains
//   isolate_only  one chain selected with MISR feedback left on
//   sig_unload    the final signature shifted out on misr_so, pass held
// Every serial output bit and the session length are checked against the model.
module tb_lbist_diag_top;
  import bist_pkg::*;
  import lbist_ref_pkg::*;

  localparam int N = 8, L = 6, MAXV = 64;
  localparam int VW = $clog2(MAXV + 1);
  localparam logic [N-1:0] POLY = 8'h71, SEED = 8'h5A;
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
  int ffirst = 0, fperiod = 0, cap_count = 0;
  int checks = 0, failures = 0;
  bit dut_q[$];
  int shift_q[$];   // number of SHIFT-phase clocks so far, per recorded clock; -1: not a shift clock

  int n_normal_pass = 0, n_normal_fail = 0, n_diag_session = 0, n_diag_found = 0;
  int n_diag_clean = 0, n_fsm_wrap = 0, n_aliasing = 0, n_alias_solved = 0, n_isolate_only = 0;
  int n_sig_unload = 0;

  ref_t rf = new(POLY, SEED);

  always #5 clk = ~clk;

  lbist_diag_top #(.N(N), .L(L), .MAX_VECTORS(MAXV), .POLY(POLY), .SEED(SEED)) dut (.*);

  // stand-in for the logic under test; cap_count+1 is the vector being captured
  // The response is formed in the capture cycle, when the scan cells are
  // stable, so the stand-in logic is evaluated once per vector.
  always @(negedge clk) begin
    if (bist_phase == ST_CAPTURE) cut_resp <= ref_t::resp(scan_cells, cap_count + 1, fmask, ffirst, fperiod);
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one DUT session and record its serial output after every clock
  task automatic dut_session(int nvec, int len);
    int nshift;
    bit is_shift;
    dut_q.delete();
    @(negedge clk);
    num_vectors = VW'(nvec);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cap_count = 0;
    shift_q.delete();
    nshift = 0;
    for (int c = 0; c < len; c++) begin
      check(!done, "done not before the predicted clock");
      is_shift = (bist_phase == ST_SHIFT);
      @(negedge clk);
      dut_q.push_back(misr_so);
      if (is_shift) nshift++;
      shift_q.push_back(is_shift ? nshift : -1);
    end
    check(done && !busy, $sformatf("done after %0d clocks", len));
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
    check(diag_state == N'(1 << k) && diag_mode, $sformatf("FSM selects chain %0d", k));
  endtask

  task automatic normal_mode();
    @(negedge clk);
    diag_clear = 1'b1;
    diag_d = 1'b0;
    @(negedge clk);
    diag_clear = 1'b0;
    check(diag_state == '0 && !diag_mode, "FSM in all-0 state");
  endtask

  // Diagnose chain k: compare the DUT stream with the fault-free stream of the
  // model and return the first failing vector and its failing cells.
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
    n_diag_session++;
    // the DUT must match the model of the faulty circuit exactly
    rf.run(nvec, k, 1'b1, fmask, ffirst, fperiod, 1'b1);
    check(dut_q.size() == rf.so_q.size(), "stream length");
    foreach (dut_q[i]) if (i < rf.so_q.size()) check(dut_q[i] == rf.so_q[i], $sformatf("chain %0d clock %0d", k, i));
    first_vec = -1;
    cells.delete();
    foreach (dut_q[i]) begin
      // a new bit reaches misr_so only on a shift clock
      if (shift_q[i] > 0 && dut_q[i] != good_q[i]) begin
        check(tv[i] > 0, "mismatch maps to a response bit");
        // shift clock after which cell c of vector v of chain k is on misr_so
        check(shift_q[i] == (tv[i] - 1) * L + (L - 1 - tcell[i]) + (N - 1 - k) + 1,
              $sformatf("stream position formula: shift %0d, v %0d c %0d k %0d", shift_q[i], tv[i], tcell[i], k));
        if (first_vec < 0 || tv[i] < first_vec) begin
          first_vec = tv[i];
          cells.delete();
        end
        if (tv[i] == first_vec) cells.push_back(tcell[i]);
      end
    end
  endtask

  initial begin
    cells_t none = '0;
    logic [N-1:0] good_sig;
    int fv;
    int cl[$];

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // A: fault-free normal session
    normal_mode();
    rf.run(20, -1, 1'b0, none, 0, 0, 1'b1);
    good_sig = rf.final_sig;
    expected_sig = good_sig;
    dut_session(20, rf.length);
    check(rf.length == L + 20 * (L + 1) + N - 1, "session length formula");
    check(signature == good_sig && pass, $sformatf("fault-free session passes %h %h", signature, good_sig));
    foreach (dut_q[i]) check(dut_q[i] == rf.so_q[i], $sformatf("normal stream clock %0d", i));
    if (pass) n_normal_pass++;
    // serial unload of the signature
    sig_unload = 1'b1;
    for (int j = 0; j < N; j++) begin
      check(misr_so == good_sig[N-1-j], $sformatf("signature bit %0d on misr_so", N - 1 - j));
      @(negedge clk);
      check(pass && done, "pass held during unload");
    end
    sig_unload = 1'b0;
    n_sig_unload++;

    // B: faulty normal session
    fmask = '0;
    fmask[2][3] = 1'b1;
    fmask[5][4] = 1'b1;
    ffirst = 7;
    fperiod = 3;
    rf.run(20, -1, 1'b0, fmask, ffirst, fperiod, 1'b0);
    dut_session(20, rf.length);
    check(signature == rf.final_sig, "faulty signature matches model");
    check(!pass && signature != good_sig, "faulty session fails");
    if (!pass) n_normal_fail++;

    // C: diagnose every chain
    for (int k = 0; k < N; k++) begin
      diagnose(k, 20, fv, cl);
      if (k == 2 || k == 5) begin
        check(fv == 7 && cl.size() == 1 && cl[0] == ((k == 2) ? 3 : 4),
              $sformatf("chain %0d: first failing vector %0d, %0d cells", k, fv, cl.size()));
        if (fv == 7) n_diag_found++;
      end else begin
        check(fv < 0, $sformatf("chain %0d clean", k));
        if (fv < 0) n_diag_clean++;
      end
    end
    // wrap from the last chain to the first
    @(negedge clk);
    diag_step = 1'b1;
    @(negedge clk);
    diag_step = 1'b0;
    check(diag_state == N'(1), "FSM wraps to chain 0");
    if (diag_state == N'(1)) n_fsm_wrap++;

    // D: two errors that cancel in the signature
    normal_mode();
    fmask = '0;
    fmask[2][3] = 1'b1;
    fmask[3][2] = 1'b1;
    ffirst = 5;
    fperiod = 0;
    rf.run(12, -1, 1'b0, none, 0, 0, 1'b0);
    good_sig = rf.final_sig;
    expected_sig = good_sig;
    rf.run(12, -1, 1'b0, fmask, ffirst, fperiod, 1'b0);
    check(rf.final_sig == good_sig, "model predicts aliasing");
    dut_session(12, rf.length);
    check(pass, "aliased faulty session passes in normal mode");
    if (pass) n_aliasing++;
    diagnose(2, 12, fv, cl);
    check(fv == 5 && cl.size() == 1 && cl[0] == 3, "aliased error found in chain 2");
    if (fv == 5) n_alias_solved++;
    diagnose(3, 12, fv, cl);
    check(fv == 5 && cl.size() == 1 && cl[0] == 2, "aliased error found in chain 3");
    if (fv == 5) n_alias_solved++;

    // E: chain isolated, MISR feedback left on
    select_chain(4);
    diag_d = 1'b0;
    rf.run(12, 4, 1'b0, fmask, ffirst, fperiod, 1'b0);
    dut_session(12, rf.length);
    check(signature == rf.final_sig, "isolated chain with feedback matches model");
    n_isolate_only++;
    normal_mode();

    check(n_normal_pass > 0, "mechanism normal_pass");
    check(n_normal_fail > 0, "mechanism normal_fail");
    check(n_diag_session >= N, "mechanism diag_session");
    check(n_diag_found == 2, "mechanism diag_found");
    check(n_diag_clean == N - 2, "mechanism diag_clean");
    check(n_fsm_wrap > 0, "mechanism fsm_wrap");
    check(n_aliasing > 0, "mechanism aliasing");
    check(n_alias_solved == 2, "mechanism alias_solved");
    check(n_isolate_only > 0, "mechanism isolate_only");
    check(n_sig_unload > 0, "mechanism sig_unload");
    $display("mechanisms: normal_pass=%0d normal_fail=%0d diag_session=%0d diag_found=%0d diag_clean=%0d fsm_wrap=%0d aliasing=%0d alias_solved=%0d isolate_only=%0d sig_unload=%0d",
             n_normal_pass, n_normal_fail, n_diag_session, n_diag_found, n_diag_clean,
             n_fsm_wrap, n_aliasing, n_alias_solved, n_isolate_only, n_sig_unload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
