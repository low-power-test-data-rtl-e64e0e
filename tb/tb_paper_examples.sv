// Directed testbench: the two worked examples of the hold-flag encoding on a
// single chain of 16 cells in 4 blocks. The first cube, 0XX1 X111 1X1X XXXX,
// must encode to flags 0,1,1,X with data 0XX1 in block 1 (5 specified bits
// instead of 7). The second, X01X X0X0 XXXX 111X, needs the conversion step
// twice: flags 0,1,0,1, block 1 data X010 (its last bit specified so that
// block 2 can be held at 0) and block 3 data XXX1 (8 specified bits). The
// encoder checks those rows; then seeds are solved and the decompressor must
// rebuild both cubes.
module tb_paper_examples;
  bit done;
  int checks, failures;

  workload_run #(.NAME("worked examples"), .N(1), .L(16), .B(4), .NP(2), .EXAMPLES(1'b1))
    u_run (.done(done), .checks(checks), .failures(failures));

  initial begin
    #1000000;
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
