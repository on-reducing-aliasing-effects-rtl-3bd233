// tb_lbist_full: one complete BIST session at the full default size.
//
// 96 scan chains of 499 cells, a 96-bit generator and signature register and
// the full 16K (16384) vector session.  The expected signature comes from the
// procedural reference model in lbist_ref_pkg with the same stand-in logic
// under test.  Checks: done rises exactly L + V*(L+1) + N-1 clocks after start,
// the signature equals the model's, pass is high; then a second session with a
// single faulty cell at vector 16000 must end with pass low.
module tb_lbist_full;
  import bist_pkg::*;
  import lbist_ref_pkg::*;

  localparam int N = DEF_CHAINS, L = DEF_CHAIN_LEN, V = DEF_MAX_VECTORS;
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
  int checks = 0, failures = 0;
  longint clocks;

  ref_t rf = new(DEF_POLY, DEF_SEED);

  always #5 clk = ~clk;

  lbist_diag_top dut (.*);

  // The response is formed in the capture cycle, when the scan cells are
  // stable, so the stand-in logic is evaluated once per vector.
  always @(negedge clk) begin
    if (bist_phase == ST_CAPTURE) cut_resp <= ref_t::resp(scan_cells, cap_count + 1, fmask, ffirst, 0);
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
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic session();
    @(negedge clk);
    num_vectors = VW'(V);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cap_count = 0;
    clocks = 0;
    while (!done) begin
      @(negedge clk);
      clocks++;
    end
  endtask

  initial begin
    cells_t none = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rf.run(V, -1, 1'b0, none, 0, 0, 1'b0);
    expected_sig = rf.final_sig;
    session();
    check(clocks == longint'(L) + longint'(V) * (L + 1) + N - 1,
          $sformatf("session took %0d clocks", clocks));
    check(clocks == rf.length, "session length equals the model's");
    check(signature == rf.final_sig, $sformatf("signature %h, expected %h", signature, rf.final_sig));
    check(pass, "fault-free session passes");
    check(int'(vec_count) == V, "all vectors applied");
    $display("full session: %0d vectors, %0d clocks, signature %h", V, clocks, signature);
    // one faulty cell late in the session
    fmask[47][250] = 1'b1;
    ffirst = 16000;
    session();
    check(!pass, "faulty session fails");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
