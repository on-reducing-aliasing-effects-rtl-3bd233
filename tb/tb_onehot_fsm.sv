// tb_onehot_fsm: reset state, stepping order, wrap-around and clear of the
// chain-selecting state machine, and the chain_pass decode in both modes.
module tb_onehot_fsm;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, step = 1'b0;
  logic [N-1:0] state, chain_pass;
  logic diag_mode;
  logic [95:0] st96, pass96;
  logic dm96;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  onehot_fsm #(.N(N)) dut (.clk, .rst_n, .clear, .step, .state, .chain_pass, .diag_mode);
  onehot_fsm dut96 (.clk, .rst_n, .clear, .step, .state(st96), .chain_pass(pass96), .diag_mode(dm96));

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
    int sel;
    repeat (2) @(negedge clk);
    check(state == '0 && chain_pass == '1 && !diag_mode, "reset: all-0, every chain passes");
    check(st96 == '0 && pass96 == '1, "reset 96");
    rst_n = 1'b1;
    @(negedge clk);
    check(state == '0, "stays in all-0 without step");
    for (int i = 0; i < 3 * N; i++) begin
      step = 1'b1;
      @(negedge clk);
      step = 1'b0;
      sel = i % N;
      check(state == N'(1 << sel), $sformatf("step %0d selects chain %0d (state %b)", i, sel, state));
      check(chain_pass == N'(1 << sel) && diag_mode, "only the selected chain passes");
      check(st96 == (96'd1 << (i % 96)) && pass96 == st96 && dm96, "96-bit state");
      @(negedge clk);
      check(state == N'(1 << sel), "holds without step");
    end
    clear = 1'b1; step = 1'b1;
    @(negedge clk);
    clear = 1'b0; step = 1'b0;
    check(state == '0 && chain_pass == '1 && !diag_mode, "clear wins, back to normal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
