// Self-checking testbench of hold_mux: random hold / LFSR / head vectors;
// each chain input must equal the head bit where the hold flag is 1 and the
// LFSR bit where it is 0.
module tb_hold_mux;
  localparam int unsigned N = 31;
  logic [N-1:0] hold, lfsr_bit, scan_head, scan_in;
  int checks = 0, failures = 0;

  hold_mux dut (.hold(hold), .lfsr_bit(lfsr_bit), .scan_head(scan_head), .scan_in(scan_in));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2000; c++) begin
      hold = N'($urandom);
      lfsr_bit = N'($urandom);
      scan_head = N'($urandom);
      if (c == 0) hold = '0;
      if (c == 1) hold = '1;
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (scan_in[i] !== (hold[i] == 1'b1 ? scan_head[i] : lfsr_bit[i])) begin
          failures++;
          if (failures < 10) $display("chain %0d: h=%0b l=%0b s=%0b out=%0b", i, hold[i], lfsr_bit[i], scan_head[i], scan_in[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
