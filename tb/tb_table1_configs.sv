// Runs the workload flow of workload_run on every scan configuration of the
// published results: for each benchmark circuit and block count, the number
// of scan chains and the HF-SR size as published, and the chain length from
// the circuit's number of scan inputs (primary inputs plus flip-flops:
// s5378 214, s9234 247, s13207 700, s15850 611, s38417 1664, s38584 1464)
// divided over the chains. The test cubes are synthetic, not the circuits'
// own. Each configuration is encoded twice, with all-X blocks left
// unspecified and with all-X blocks held; the 24 decompressors run side by
// side and the result is the sum of their checks and failures.
module tb_table1_configs;
  localparam int NC = 24;
  bit d[NC];
  int c[NC], f[NC];

  workload_run #(.NAME("s5378_31"), .N(11), .L(20), .B(3), .HOLD_DC(1'b0)) u_s5378_31_0 (.done(d[0]), .checks(c[0]), .failures(f[0]));
  workload_run #(.NAME("s5378_31"), .N(11), .L(20), .B(3), .HOLD_DC(1'b1)) u_s5378_31_1 (.done(d[1]), .checks(c[1]), .failures(f[1]));
  workload_run #(.NAME("s5378_22"), .N(11), .L(20), .B(2), .HOLD_DC(1'b0)) u_s5378_22_0 (.done(d[2]), .checks(c[2]), .failures(f[2]));
  workload_run #(.NAME("s5378_22"), .N(11), .L(20), .B(2), .HOLD_DC(1'b1)) u_s5378_22_1 (.done(d[3]), .checks(c[3]), .failures(f[3]));
  workload_run #(.NAME("s9234_31"), .N(11), .L(23), .B(3), .HOLD_DC(1'b0)) u_s9234_31_0 (.done(d[4]), .checks(c[4]), .failures(f[4]));
  workload_run #(.NAME("s9234_31"), .N(11), .L(23), .B(3), .HOLD_DC(1'b1)) u_s9234_31_1 (.done(d[5]), .checks(c[5]), .failures(f[5]));
  workload_run #(.NAME("s9234_11"), .N(11), .L(23), .B(1), .HOLD_DC(1'b0)) u_s9234_11_0 (.done(d[6]), .checks(c[6]), .failures(f[6]));
  workload_run #(.NAME("s9234_11"), .N(11), .L(23), .B(1), .HOLD_DC(1'b1)) u_s9234_11_1 (.done(d[7]), .checks(c[7]), .failures(f[7]));
  workload_run #(.NAME("s13207_100"), .N(21), .L(34), .B(5), .HOLD_DC(1'b0)) u_s13207_100_0 (.done(d[8]), .checks(c[8]), .failures(f[8]));
  workload_run #(.NAME("s13207_100"), .N(21), .L(34), .B(5), .HOLD_DC(1'b1)) u_s13207_100_1 (.done(d[9]), .checks(c[9]), .failures(f[9]));
  workload_run #(.NAME("s13207_20"), .N(21), .L(34), .B(1), .HOLD_DC(1'b0)) u_s13207_20_0 (.done(d[10]), .checks(c[10]), .failures(f[10]));
  workload_run #(.NAME("s13207_20"), .N(21), .L(34), .B(1), .HOLD_DC(1'b1)) u_s13207_20_1 (.done(d[11]), .checks(c[11]), .failures(f[11]));
  workload_run #(.NAME("s15850_51"), .N(21), .L(30), .B(3), .HOLD_DC(1'b0)) u_s15850_51_0 (.done(d[12]), .checks(c[12]), .failures(f[12]));
  workload_run #(.NAME("s15850_51"), .N(21), .L(30), .B(3), .HOLD_DC(1'b1)) u_s15850_51_1 (.done(d[13]), .checks(c[13]), .failures(f[13]));
  workload_run #(.NAME("s15850_31"), .N(21), .L(30), .B(2), .HOLD_DC(1'b0)) u_s15850_31_0 (.done(d[14]), .checks(c[14]), .failures(f[14]));
  workload_run #(.NAME("s15850_31"), .N(21), .L(30), .B(2), .HOLD_DC(1'b1)) u_s15850_31_1 (.done(d[15]), .checks(c[15]), .failures(f[15]));
  workload_run #(.NAME("s38417_185"), .N(31), .L(54), .B(6), .HOLD_DC(1'b0)) u_s38417_185_0 (.done(d[16]), .checks(c[16]), .failures(f[16]));
  workload_run #(.NAME("s38417_185"), .N(31), .L(54), .B(6), .HOLD_DC(1'b1)) u_s38417_185_1 (.done(d[17]), .checks(c[17]), .failures(f[17]));
  workload_run #(.NAME("s38417_152"), .N(31), .L(54), .B(5), .HOLD_DC(1'b0)) u_s38417_152_0 (.done(d[18]), .checks(c[18]), .failures(f[18]));
  workload_run #(.NAME("s38417_152"), .N(31), .L(54), .B(5), .HOLD_DC(1'b1)) u_s38417_152_1 (.done(d[19]), .checks(c[19]), .failures(f[19]));
  workload_run #(.NAME("s38584_209"), .N(31), .L(48), .B(7), .HOLD_DC(1'b0)) u_s38584_209_0 (.done(d[20]), .checks(c[20]), .failures(f[20]));
  workload_run #(.NAME("s38584_209"), .N(31), .L(48), .B(7), .HOLD_DC(1'b1)) u_s38584_209_1 (.done(d[21]), .checks(c[21]), .failures(f[21]));
  workload_run #(.NAME("s38584_21"), .N(31), .L(48), .B(1), .HOLD_DC(1'b0)) u_s38584_21_0 (.done(d[22]), .checks(c[22]), .failures(f[22]));
  workload_run #(.NAME("s38584_21"), .N(31), .L(48), .B(1), .HOLD_DC(1'b1)) u_s38584_21_1 (.done(d[23]), .checks(c[23]), .failures(f[23]));

  initial begin
    #4000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    wait (d.and());
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end
endmodule
