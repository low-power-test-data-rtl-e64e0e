// End-to-end testbench of lp_reseed_decompressor at its default size
// (31 chains x 54 cells, 6 blocks of 9 cells, 256-bit LFSR), acting as the
// tester. Random seeds are offered, back to back or after idle gaps, and the
// scan chains are modelled by scan_chains_model, which loads a random
// response at each capture. A reference model written here (LFSR, tap
// network, hold-flag registers, hold rule) predicts the content of every
// chain after each pattern; the testbench compares it with the chains in the
// capture cycle, checks the pattern length (N_BLOCKS cycles more when the
// update flag is 1) and counts how often each mechanism occurred: new hold
// cube, reused hold cube, held block, LFSR-fed block, first block held at the
// captured value, back-to-back seed, idle gap. It also reports the scan-in
// transitions against those of plain reseeding of the same LFSR sequence.
module tb_lp_reseed_decompressor;
  import lpr_pkg::*;
  localparam int unsigned N = DEF_N_CHAINS;
  localparam int unsigned L = DEF_CHAIN_LEN;
  localparam int unsigned B = DEF_N_BLOCKS;
  localparam int unsigned LL = DEF_LFSR_LEN;
  localparam int unsigned K = (L + B - 1) / B;
  localparam int NP = 400;

  logic clk = 1'b0, rst_n = 1'b0, seed_valid = 1'b0;
  logic [LL-1:0] seed = '0;
  logic seed_ready, shift_en, capture_en, update_flag, hold_loading;
  logic [N-1:0] scan_head, scan_in, hold_now;
  logic [N-1:0][L-1:0] resp = '0, cells;
  int checks = 0, failures = 0;

  lp_reseed_decompressor dut (
    .clk(clk), .rst_n(rst_n), .seed_valid(seed_valid), .seed(seed), .seed_ready(seed_ready),
    .scan_head(scan_head), .scan_in(scan_in), .shift_en(shift_en), .capture_en(capture_en),
    .update_flag(update_flag), .hold_loading(hold_loading), .hold_now(hold_now));

  scan_chains_model #(.N(N), .L(L)) chains (
    .clk(clk), .rst_n(rst_n), .shift_en(shift_en), .capture_en(capture_en),
    .scan_in(scan_in), .resp(resp), .head(scan_head), .cells(cells));

  always #5 clk = ~clk;

  initial begin
    repeat (NP * (L + B + 8) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  function automatic logic [LL-1:0] ref_next(logic [LL-1:0] s);
    return {s[LL-2:0], s[255] ^ s[253] ^ s[250] ^ s[245]};
  endfunction
  function automatic logic [N:0] ref_out(logic [LL-1:0] s);
    logic [N:0] o;
    for (int j = 0; j <= int'(N); j++) o[j] = s[(8 * j) % LL] ^ s[(11 * j + 83) % LL] ^ s[(13 * j + 173) % LL];
    return o;
  endfunction

  bit hf[N][B];                 // reference hold cube
  logic [N-1:0][L-1:0] exp_cells;
  bit exp_uf;
  int n_upd = 0, n_reuse = 0, n_hold_blk = 0, n_lfsr_blk = 0, n_first_held = 0;
  int n_b2b = 0, n_gap = 0, n_patterns = 0;
  longint tr_dut = 0, tr_plain = 0;

  task automatic predict(logic [LL-1:0] sd, logic [N-1:0] head0);
    logic [LL-1:0] s;
    logic [N:0] w;
    logic [N-1:0] last;
    bit ok_held;
    s = sd;
    w = ref_out(s);
    exp_uf = w[N];
    if (exp_uf) begin
      for (int b = 0; b < int'(B); b++) begin
        w = ref_out(s);
        for (int i = 0; i < int'(N); i++) hf[i][b] = w[i];
        s = ref_next(s);
      end
      n_upd++;
    end else n_reuse++;
    last = head0;
    for (int t = 0; t < int'(L); t++) begin
      w = ref_out(s);
      for (int i = 0; i < int'(N); i++) begin
        logic bitv;
        bitv = hf[i][t / K] ? last[i] : w[i];
        if (t > 0 && bitv != last[i]) tr_dut++;
        exp_cells[i][L - 1 - t] = bitv;
        last[i] = bitv;
      end
      s = ref_next(s);
    end
    for (int i = 0; i < int'(N); i++)
      for (int b = 0; b < int'(B); b++) begin
        if (hf[i][b]) n_hold_blk++; else n_lfsr_blk++;
      end
    for (int i = 0; i < int'(N); i++) if (hf[i][0]) n_first_held++;
  endtask

  // Plain reseeding reference for the transition count: each chain would
  // receive the LFSR data bits directly, with no hold cube in the sequence.
  function automatic longint plain_transitions(logic [LL-1:0] sd, bit uf);
    logic [LL-1:0] s;
    logic [N:0] w, prev;
    longint n;
    n = 0;
    s = sd;
    if (uf) repeat (B) s = ref_next(s);
    for (int t = 0; t < int'(L); t++) begin
      w = ref_out(s);
      if (t > 0) for (int i = 0; i < int'(N); i++) if (w[i] != prev[i]) n++;
      prev = w;
      s = ref_next(s);
    end
    return n;
  endfunction

  // ---------------- tester ----------------
  initial begin
    logic [LL-1:0] cur_seed;
    logic [N-1:0] head_start;
    bit have_pattern, b2b;
    int cyc, n_shift, n_hload;
    have_pattern = 1'b0;
    cyc = 0; n_shift = 0; n_hload = 0;
    head_start = '0;
    tr_plain = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    b2b = 1'b0;
    while (n_patterns < NP) begin
      @(negedge clk);
      #1;
      if (have_pattern) cyc++;
      if (shift_en) n_shift++;
      if (hold_loading) n_hload++;
      if (capture_en) begin
        // pattern complete: compare every chain
        predict(cur_seed, head_start);
        tr_plain += plain_transitions(cur_seed, exp_uf);
        for (int i = 0; i < int'(N); i++) begin
          checks++;
          if (cells[i] !== exp_cells[i]) begin
            failures++;
            if (failures < 10) $display("pattern %0d chain %0d: got %h exp %h", n_patterns, i, cells[i], exp_cells[i]);
          end
        end
        checks++;
        if (update_flag !== exp_uf) begin failures++; $display("update flag %0b exp %0b", update_flag, exp_uf); end
        checks++;
        if (cyc != int'(exp_uf ? B : 0) + int'(L) + 1 || n_shift != int'(L) || n_hload != int'(exp_uf ? B : 0)) begin
          failures++;
          $display("pattern %0d: %0d cycles, %0d shifts, %0d hold loads (uf=%0b)", n_patterns, cyc, n_shift, n_hload, exp_uf);
        end
        n_patterns++;
        have_pattern = 1'b0;
        // response the circuit captures now; it becomes the head value of the next pattern
        for (int i = 0; i < int'(N); i++) resp[i] = {$urandom, $urandom};
        for (int i = 0; i < int'(N); i++) head_start[i] = resp[i][0];
        b2b = 1'($urandom);
      end
      // offer a seed
      if (!have_pattern && !seed_valid && (b2b || $urandom_range(0, 2) == 0)) begin
        seed_valid = 1'b1;
        for (int k = 0; k < int'(LL); k += 32) seed[k +: 32] = $urandom;
      end
      #1;
      if (seed_valid && seed_ready) begin
        if (capture_en) n_b2b++; else n_gap++;
        cur_seed = seed;
        have_pattern = 1'b1;
        cyc = 0; n_shift = 0; n_hload = 0;
        @(posedge clk);
        #1 seed_valid = 1'b0;
        b2b = 1'b0;
      end
    end
    $display("patterns %0d: new hold cube %0d, reused %0d; blocks held %0d, LFSR-fed %0d, first block held %0d; seeds back-to-back %0d, after gap %0d",
             n_patterns, n_upd, n_reuse, n_hold_blk, n_lfsr_blk, n_first_held, n_b2b, n_gap);
    $display("scan-in transitions: %0d with hold flags, %0d with plain reseeding", tr_dut, tr_plain);
    checks++;
    if (n_upd == 0 || n_reuse == 0 || n_hold_blk == 0 || n_lfsr_blk == 0 || n_first_held == 0 || n_b2b == 0 || n_gap == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    checks++;
    if (tr_dut >= tr_plain) begin failures++; $display("hold flags did not reduce transitions"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
