// tb_lbist_controller: phase sequence and session length.
// For several vector counts the outputs are compared on every clock with the
// expected schedule: L load clocks, then per vector one capture clock and L
// shift clocks with the MISR enabled, the last shift N-1 clocks longer, so that
// done rises L + V*(L+1) + N-1 clocks after start.  pass must follow the
// signature compare; num_vectors = 0 runs one vector.  In DONE, sig_unload
// must drive misr_unload while pass keeps the compare made before unloading.
module tb_lbist_controller;
  import bist_pkg::*;
  localparam int N = 4, L = 5, MAXV = 16;
  localparam int VW = $clog2(MAXV + 1);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [VW-1:0] num_vectors = '0, vec_count;
  logic [N-1:0] signature = 4'h5, expected_sig = 4'h5;
  logic scan_en, capture_en, prpg_en, prpg_seed, misr_en, misr_clear, busy, done, pass;
  logic sig_unload = 1'b0, misr_unload;
  bist_state_e state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lbist_controller #(.N(N), .L(L), .MAX_VECTORS(MAXV)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int v);
    int vv, c, caps;
    vv = (v == 0) ? 1 : v;
    @(negedge clk);
    num_vectors = VW'(v);
    start = 1'b1;
    #1;
    check(misr_clear && prpg_seed, "start clears the MISR and reseeds the PRPG");
    @(negedge clk);
    start = 1'b0;
    c = 0;
    caps = 0;
    // load
    for (int i = 0; i < L; i++) begin
      check(scan_en && prpg_en && !misr_en && !capture_en && busy, $sformatf("v=%0d load clock %0d", v, i));
      @(negedge clk); c++;
    end
    for (int x = 1; x <= vv; x++) begin
      check(capture_en && !scan_en && !misr_en, $sformatf("v=%0d capture %0d", v, x));
      @(negedge clk); c++;
      caps++;
      check(vec_count == VW'(x), "vector count");
      for (int i = 0; i < L + ((x == vv) ? N - 1 : 0); i++) begin
        check(scan_en && misr_en && !capture_en, $sformatf("v=%0d shift %0d of vector %0d", v, i, x));
        @(negedge clk); c++;
      end
    end
    check(done && !busy && !scan_en && !misr_en, $sformatf("v=%0d done", v));
    check(c == L + vv * (L + 1) + N - 1, $sformatf("session length %0d", c));
    check(pass == (signature == expected_sig), "pass follows the compare");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && !scan_en, "idle after reset");
    run(1);
    run(3);
    expected_sig = 4'h6;
    #1 check(!pass, "mismatching signature fails");
    expected_sig = 4'h5;
    run(0);
    // unload: the signature changes, pass holds
    check(pass && !misr_unload, "pass before unload");
    sig_unload = 1'b1;
    #1 check(misr_unload, "sig_unload drives misr_unload in DONE");
    @(negedge clk);
    signature = 4'h0;
    #1 check(pass, "pass held while the signature is shifted out");
    sig_unload = 1'b0;
    run(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
