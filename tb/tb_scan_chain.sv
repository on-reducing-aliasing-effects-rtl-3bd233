// tb_scan_chain: shift, capture and hold of a 6-cell scan chain.
// A random stream shifted in must reappear at so exactly L clocks later; a
// captured word must shift out last cell first; shift enable wins over capture.
module tb_scan_chain;
  localparam int L = 6;
  logic clk = 1'b0;
  logic se = 1'b0, ce = 1'b0, si = 1'b0;
  logic [L-1:0] d = '0, q;
  logic so;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_chain #(.L(L)) dut (.clk, .se, .ce, .si, .d, .q, .so);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist[$];
    logic [L-1:0] w;
    // shift a random stream
    se = 1'b1;
    for (int i = 0; i < 60; i++) begin
      si = 1'($urandom);
      hist.push_back(si);
      @(negedge clk);
      if (hist.size() >= L) begin
        check(so == hist[hist.size()-L], $sformatf("stream bit %0d", i));
      end
    end
    // capture, then unload
    for (int r = 0; r < 8; r++) begin
      w = L'($urandom);
      se = 1'b0; ce = 1'b1; d = w;
      @(negedge clk);
      check(q == w, "capture loads d");
      ce = 1'b0;
      @(negedge clk);
      check(q == w, "hold");
      se = 1'b1;
      for (int j = L - 1; j >= 0; j--) begin
        check(so == w[j], $sformatf("unload cell %0d", j));
        @(negedge clk);
      end
    end
    // shift wins over capture
    se = 1'b1; ce = 1'b1; si = 1'b1; d = '0;
    @(negedge clk);
    check(q[0] == 1'b1 && q != '0, "se has priority over ce");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
