// Workload testbench at the default size (31 chains x 54 cells, 6 blocks,
// 256-bit LFSR): 120 synthetic test cubes are encoded with hold flags,
// grouped into hold-cube compatible sets, turned into seeds by GF(2)
// elimination and decompressed; every specified bit is checked in the scan
// chains, and specified-bit counts, scan-in transitions and test time are
// reported against plain reseeding. See workload_run for the flow.
module tb_workload_encode;
  bit done;
  int checks, failures;

  workload_run u_run (.done(done), .checks(checks), .failures(failures));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
