// Self-checking testbench of hf_sr. Two instances (6 blocks, the default, and
// 1 block) are driven with random load / rotate / din; a queue model of a
// rotating shift register predicts hold and flags. It also checks that after
// loading 6 flags the first one loaded is output first and that 6 rotations
// restore the hold cube.
module tb_hf_sr;
  localparam int unsigned B = 6;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, din = 1'b0, rotate = 1'b0;
  logic hold6, hold1;
  logic [B-1:0] flags6;
  logic [0:0] flags1;
  int checks = 0, failures = 0;

  hf_sr dut6 (.clk(clk), .rst_n(rst_n), .load(load), .din(din), .rotate(rotate), .hold(hold6), .flags(flags6));
  hf_sr #(.N_BLOCKS(1)) dut1 (.clk(clk), .rst_n(rst_n), .load(load), .din(din), .rotate(rotate), .hold(hold1), .flags(flags1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit m6[B];   // m6[0] = flag of the current block
  bit m1;

  task automatic check(string what);
    for (int k = 0; k < B; k++) begin
      checks++;
      if (flags6[k] !== m6[k]) begin
        failures++;
        if (failures < 10) $display("%s: flags6[%0d]=%0b exp %0b", what, k, flags6[k], m6[k]);
      end
    end
    checks++;
    if (hold6 !== m6[0] || hold1 !== m1 || flags1[0] !== m1) begin
      failures++;
      if (failures < 10) $display("%s: hold6 %0b exp %0b hold1 %0b exp %0b", what, hold6, m6[0], hold1, m1);
    end
  endtask

  task automatic cyc(bit l, bit r, bit d);
    bit t;
    @(negedge clk);
    load = l; rotate = r; din = d;
    @(posedge clk);
    if (l) begin
      for (int k = 0; k < B - 1; k++) m6[k] = m6[k + 1];
      m6[B - 1] = d;
      m1 = d;
    end else if (r) begin
      t = m6[0];
      for (int k = 0; k < B - 1; k++) m6[k] = m6[k + 1];
      m6[B - 1] = t;
    end
    #1;
    check(l ? "load" : r ? "rotate" : "idle");
  endtask

  initial begin
    bit pat[B];
    foreach (m6[k]) m6[k] = 1'b0;
    m1 = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1 check("reset");
    // Directed: load a known hold cube, then scan it out block by block.
    for (int k = 0; k < B; k++) begin
      pat[k] = 1'($urandom);
      cyc(1'b1, 1'b0, pat[k]);
    end
    for (int r = 0; r < 2; r++)
      for (int k = 0; k < B; k++) begin
        checks++;
        if (hold6 !== pat[k]) begin failures++; $display("block %0d hold %0b exp %0b", k, hold6, pat[k]); end
        cyc(1'b0, 1'b1, 1'b0);
      end
    // Random mix.
    for (int c = 0; c < 3000; c++)
      cyc(1'($urandom_range(0, 3) == 0), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
