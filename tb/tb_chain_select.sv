// tb_chain_select: random scan-out and select words on the default 96-chain
// multiplexer bank, checked bit by bit; plus the all-pass and one-hot cases.
module tb_chain_select;
  logic [95:0] scan_out, pass, misr_in;
  int checks = 0, failures = 0;

  chain_select dut (.scan_out, .pass, .misr_in);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      scan_out = {$urandom, $urandom, $urandom};
      case (t % 3)
        0: pass = {$urandom, $urandom, $urandom};
        1: pass = '1;
        default: pass = 96'd1 << (t % 96);
      endcase
      #1;
      for (int i = 0; i < 96; i++) begin
        check(misr_in[i] == (pass[i] ? scan_out[i] : 1'b0), $sformatf("t %0d bit %0d", t, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
