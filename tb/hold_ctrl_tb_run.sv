// Stimulus and checker for one hold_ctrl instance (used by tb_hold_ctrl).
module hold_ctrl_tb_run #(
  parameter int unsigned L = 54,
  parameter int unsigned B = 6
) (
  input  logic clk,
  output bit   done,
  output int   checks,
  output int   failures
);
  localparam int unsigned K = (L + B - 1) / B;

  logic rst_n = 1'b0, seed_valid = 1'b0, uf_bit = 1'b0;
  logic seed_ready, lfsr_load, lfsr_step, update_flag, hf_load, hf_rotate, shift_en, capture_en;

  hold_ctrl #(.CHAIN_LEN(L), .N_BLOCKS(B)) dut (
    .clk(clk), .rst_n(rst_n), .seed_valid(seed_valid), .seed_ready(seed_ready),
    .lfsr_load(lfsr_load), .lfsr_step(lfsr_step), .uf_bit(uf_bit), .update_flag(update_flag),
    .hf_load(hf_load), .hf_rotate(hf_rotate), .shift_en(shift_en), .capture_en(capture_en),
    .state());

  task automatic expect_sig(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("L=%0d %s: got %0b exp %0b at %0t", L, what, got, exp, $time);
    end
  endtask

  task automatic expect_strobes(bit ld, bit sh, bit rot, bit cap, bit stp, bit rdy);
    expect_sig("hf_load", hf_load, ld);
    expect_sig("shift_en", shift_en, sh);
    expect_sig("hf_rotate", hf_rotate, rot);
    expect_sig("capture_en", capture_en, cap);
    expect_sig("lfsr_step", lfsr_step, stp);
    expect_sig("seed_ready", seed_ready, rdy);
  endtask

  initial begin
    bit uf, b2b;
    int cycles, n_upd, n_noupd, n_b2b, n_gap;
    done = 1'b0; checks = 0; failures = 0;
    n_upd = 0; n_noupd = 0; n_b2b = 0; n_gap = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1 expect_strobes(0, 0, 0, 0, 0, 1);
    b2b = 1'b0;
    for (int p = 0; p < 300; p++) begin
      uf = (p < 2) ? 1'(p == 0) : 1'($urandom);
      if (!b2b) begin
        // idle gap, then a seed in ST_IDLE
        repeat ($urandom_range(0, 3)) begin
          @(negedge clk); seed_valid = 1'b0; #1 expect_strobes(0, 0, 0, 0, 0, 1);
          expect_sig("lfsr_load idle", lfsr_load, 1'b0);
        end
        @(negedge clk); seed_valid = 1'b1; #1;
        expect_strobes(0, 0, 0, 0, 0, 1);
        expect_sig("lfsr_load", lfsr_load, 1'b1);
        n_gap++;
      end else n_b2b++;
      cycles = 0;
      // first cycle and the hold-load / shift cycles
      for (int c = 0; c < int'(uf ? B : 0) + int'(L); c++) begin
        @(negedge clk);
        seed_valid = 1'b0;
        uf_bit = (c == 0) ? uf : 1'($urandom);
        #1;
        cycles++;
        if (uf && c < int'(B)) expect_strobes(1, 0, 0, 0, 1, 0);
        else begin
          int t;
          t = c - (uf ? int'(B) : 0);
          expect_strobes(0, 1, ((t % K) == K - 1) || (t == int'(L) - 1), 0, 1, 0);
        end
        if (c == 1) expect_sig("update_flag", update_flag, uf);
      end
      // capture cycle, possibly taking the next seed
      @(negedge clk);
      b2b = 1'($urandom);
      seed_valid = b2b;
      #1;
      cycles++;
      expect_strobes(0, 0, 0, 1, 0, 1);
      expect_sig("lfsr_load capture", lfsr_load, b2b);
      checks++;
      if (cycles != int'(uf ? B : 0) + int'(L) + 1) begin
        failures++;
        $display("pattern length %0d", cycles);
      end
      if (uf) n_upd++; else n_noupd++;
    end
    @(negedge clk); seed_valid = 1'b0;
    checks++;
    if (n_upd == 0 || n_noupd == 0 || n_b2b == 0 || n_gap == 0) begin
      failures++;
      $display("coverage: upd %0d noupd %0d b2b %0d gap %0d", n_upd, n_noupd, n_b2b, n_gap);
    end
    done = 1'b1;
  end
endmodule
