// Self-checking testbench of hold_ctrl at the default size (54-cell chains,
// 6 blocks of 9 cells) and at 20-cell chains with 3 blocks (last block
// shorter). For every pattern it predicts, cycle by cycle, the hold-load,
// shift, block-end, capture and LFSR step/load strobes from the update flag,
// and checks the pattern length: N_BLOCKS*uf + CHAIN_LEN + 1 cycles from the
// first cycle to the capture cycle inclusive. Seeds are offered back to back
// or after idle gaps.
module tb_hold_ctrl;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit done_a, done_b;
  int ca, fa, cb, fb;

  hold_ctrl_tb_run #(.L(54), .B(6)) run_a (.clk(clk), .done(done_a), .checks(ca), .failures(fa));
  hold_ctrl_tb_run #(.L(20), .B(3)) run_b (.clk(clk), .done(done_b), .checks(cb), .failures(fb));

  initial begin
    wait (done_a && done_b);
    checks = ca + cb;
    failures = fa + fb;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
