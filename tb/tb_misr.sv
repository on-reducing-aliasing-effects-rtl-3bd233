// tb_misr: signature register in both modes.
// Normal mode (d=0): random inputs, each step compared with a model that
// multiplies the signature by x modulo p(x) and adds the input word.
// Diagnosis mode (d=1): only input k carries random bits; each bit must leave
// so unchanged exactly N-1-k clocks after it entered, for every k.
// Also checks clear, hold (en low) and the serial unload of a signature.
module tb_misr;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0, d = 1'b0, unload = 1'b0;
  logic [N-1:0] in = '0, sig;
  logic so;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  misr #(.N(N), .POLY(8'h71)) dut (.clk, .rst_n, .clear, .en, .unload, .d, .in, .sig, .so);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] m;
    logic [N:0]   t;
    bit sent[$];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(sig == '0, "reset clears");
    // normal compaction
    m = '0;
    en = 1'b1;
    for (int i = 0; i < 500; i++) begin
      in = N'($urandom);
      t = {m, 1'b0};
      if (t[N]) t = t ^ 9'h171;
      m = t[N-1:0] ^ in;
      @(negedge clk);
      check(sig == m, $sformatf("normal step %0d: %h vs %h", i, sig, m));
    end
    en = 1'b0; in = '1;
    repeat (3) @(negedge clk);
    check(sig == m, "hold with en low");
    // serial unload, stage N-1 first, inputs ignored
    unload = 1'b1;
    en = 1'b1;
    for (int j = 0; j < N; j++) begin
      check(so == m[N-1-j], $sformatf("unload bit %0d", j));
      @(negedge clk);
    end
    check(sig == '0, "register empty after unloading");
    unload = 1'b0;
    en = 1'b0;
    // diagnosis: one input at a time goes through unmodified
    d = 1'b1;
    for (int k = 0; k < N; k++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      check(sig == '0, "clear");
      sent.delete();
      en = 1'b1;
      for (int i = 0; i < 60; i++) begin
        in = '0;
        in[k] = 1'($urandom);
        sent.push_back(in[k]);
        @(negedge clk);
        if (i >= N - 1 - k) begin
          check(so == sent[i - (N - 1 - k)], $sformatf("chain %0d bit %0d", k, i));
        end
      end
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
