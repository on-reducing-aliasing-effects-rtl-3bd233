// tb_prpg: checks the pattern generator against a polynomial-arithmetic model.
// An 8-bit instance (x^8+x^6+x^5+x^4+1) is stepped through its whole period:
// every state must match "multiply by x modulo p(x)", the seed must come back
// after exactly 255 steps and never earlier.  Hold (en=0) and reseed are
// checked, and the default 96-bit instance is compared for 300 steps.
module tb_prpg;
  import bist_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load_seed = 1'b0, en = 1'b0;
  logic [7:0]  q8;
  logic [95:0] q96;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prpg #(.N(8), .POLY(8'h71), .SEED(8'h01)) dut8 (.clk, .rst_n, .load_seed, .en, .q(q8));
  prpg dut96 (.clk, .rst_n, .load_seed, .en, .q(q96));

  function automatic logic [7:0] mulx8(logic [7:0] s);
    logic [8:0] t = {s, 1'b0};
    if (t[8]) t = t ^ 9'h171;
    return t[7:0];
  endfunction

  function automatic logic [95:0] mulx96(logic [95:0] s);
    logic [96:0] t = {s, 1'b0};
    if (t[96]) t = t ^ {1'b1, 96'd0} ^ (97'd1 << 94) ^ (97'd1 << 49) ^ (97'd1 << 47) ^ 97'd1;
    return t[95:0];
  endfunction

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
    logic [7:0]  m8;
    logic [95:0] m96;
    int period;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q8 == 8'h01 && q96 == 96'h1, "reset state is the seed");
    m8 = 8'h01;
    m96 = 96'h1;
    en = 1'b1;
    period = 0;
    for (int i = 1; i <= 255; i++) begin
      @(negedge clk);
      m8 = mulx8(m8);
      if (i <= 300) m96 = mulx96(m96);
      check(q8 == m8, $sformatf("8-bit step %0d: %h vs %h", i, q8, m8));
      check(q96 == m96, $sformatf("96-bit step %0d", i));
      if (q8 == 8'h01 && period == 0) period = i;
    end
    check(period == 255, $sformatf("8-bit period %0d, expected 255", period));
    en = 1'b0;
    repeat (3) @(negedge clk);
    check(q8 == m8, "hold with en low");
    en = 1'b1;
    repeat (5) @(negedge clk);
    load_seed = 1'b1;
    @(negedge clk);
    load_seed = 1'b0;
    check(q8 == 8'h01 && q96 == 96'h1, "reseed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
