// Workload runner (used by tb_workload_encode and tb_table1_configs): the
// complete encoding flow on a synthetic test set, played through one
// lp_reseed_decompressor of the given size.
//
// 1. Test cubes (0/1/X per scan cell) are generated with clustered specified
//    bits (runs of mostly equal values, as in ATPG test cubes), about
//    1-3 % of the cells per pattern.
// 2. Each cube is encoded chain by chain into hold flags and data bits:
//    a block with both values is a transition block (flag 0, data from the
//    LFSR); a block whose specified bits all equal the value the chain input
//    is known to hold at the end of the previous block is a non-transition
//    block (flag 1, no data bits); if that value is not known but the last
//    bit of the previous LFSR-fed block is X, that bit is specified to the
//    block's value (conversion) and the block becomes a hold block. If the
//    next block needs a value that is not yet known, an all-X block gets
//    flag 0 and its last bit is specified to that value; otherwise an all-X
//    block gets flag X (HOLD_DC = 0: fewest specified bits, best sharing of
//    hold cubes) or flag 1 (HOLD_DC = 1: the block is held, fewest
//    transitions, but nearly every flag is specified and hold cubes are
//    rarely shared).
// 3. Consecutive patterns whose hold cubes agree on every specified flag
//    form one hold-cube compatible set; only its first pattern carries the
//    update flag 1 and the merged hold cube.
// 4. For every pattern the seed is found by Gaussian elimination over GF(2)
//    on a symbolic model of the LFSR: update flag, hold flags (when sent) and
//    the data bits of flag-0 blocks are the equations.
// 5. The seeds are played through the decompressor and every specified bit
//    of every original cube is checked in the scan chains.
// It reports specified bits (original against update + hold + data) and
// scan-in transitions against conventional reseeding of the same cubes with
// the same LFSR (seed solved for all specified bits, no hold flags), and the
// test time increase. Checks: every specified bit, every seed solvable,
// fewer transitions than conventional reseeding, and the cycle count.
module workload_run
  import lpr_pkg::*;
#(
  parameter string NAME = "default",
  parameter int N  = DEF_N_CHAINS,
  parameter int L  = DEF_CHAIN_LEN,
  parameter int B  = DEF_N_BLOCKS,
  parameter int NP = 120,              // patterns
  parameter bit HOLD_DC = 1'b0,        // 1: all-X blocks get flag 1 instead of X
  parameter bit EXAMPLES = 1'b0        // 1: chain 0 of patterns 0 and 1 carries the two worked examples
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int LL = DEF_LFSR_LEN;
  localparam int K  = (L + B - 1) / B;
  localparam int MIN_CL = N * L / 600 + 1;   // clusters of specified bits per cube
  localparam int MAX_CL = N * L / 300 + 1;
  localparam int T  = B + L;           // LFSR words per pattern at most
  localparam byte X = 2;

  logic clk = 1'b0, rst_n = 1'b0, seed_valid = 1'b0;
  logic [LL-1:0] seed = '0;
  logic seed_ready, shift_en, capture_en, update_flag, hold_loading;
  logic [N-1:0] scan_head, scan_in, hold_now;
  logic [N-1:0][L-1:0] resp = '0, cells;

  lp_reseed_decompressor #(.N_CHAINS(N), .CHAIN_LEN(L), .N_BLOCKS(B)) dut (
    .clk(clk), .rst_n(rst_n), .seed_valid(seed_valid), .seed(seed), .seed_ready(seed_ready),
    .scan_head(scan_head), .scan_in(scan_in), .shift_en(shift_en), .capture_en(capture_en),
    .update_flag(update_flag), .hold_loading(hold_loading), .hold_now(hold_now));

  scan_chains_model #(.N(N), .L(L)) chains (
    .clk(clk), .rst_n(rst_n), .shift_en(shift_en), .capture_en(capture_en),
    .scan_in(scan_in), .resp(resp), .head(scan_head), .cells(cells));

  always #5 clk = ~clk;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  // ---------------- test set and encoding ----------------
  byte cube [NP][N][L];     // original test cubes, bit t = t-th bit shifted in
  byte dspec[NP][N][L];     // data bits after conversion
  byte hfl  [NP][N][B];     // hold flags of each pattern
  byte mcube[NP][N][B];     // merged hold cube in force for each pattern
  bit  upd  [NP];
  logic [LL-1:0] seeds[NP];
  logic [LL-1:0] plain_seeds[NP];

  // The two worked examples of the scheme (4 blocks of 4 bits, shift order
  // left to right): the original cube and the expected encoding, hold flags
  // and the data bits of flag-0 blocks ("-" = not compared).
  localparam string EX_CUBE [2] = '{"0XX1X1111X1XXXXX", "X01XX0X0XXXX111X"};
  localparam string EX_FLAGS[2] = '{"011X", "0101"};
  localparam string EX_DATA [2] = '{"0XX1--------XXXX", "X010----XXX1----"};

  function automatic byte ch2v(byte c);
    return (c == "X") ? X : (c == "-") ? -1 : byte'(c - "0");
  endfunction

  function automatic void gen_cube(int p);
    for (int i = 0; i < N; i++) for (int t = 0; t < L; t++) cube[p][i][t] = X;
    if (EXAMPLES && p < 2) begin
      for (int t = 0; t < L && t < 16; t++) cube[p][0][t] = ch2v(EX_CUBE[p][t]);
      return;
    end
    repeat ($urandom_range(MIN_CL, MAX_CL)) begin
      int i, t0, len;
      byte v;
      i = $urandom_range(0, N - 1);
      t0 = $urandom_range(0, L - 1);
      len = $urandom_range(10, 30);
      v = byte'($urandom_range(0, 1));
      repeat ($urandom_range(len / 4, len / 2)) begin
        int t;
        t = t0 + $urandom_range(0, len - 1);
        if (t < L) cube[p][i][t] = ($urandom_range(0, 9) < 8) ? v : byte'(1 - v);
      end
    end
  endfunction

  // block contents: 0 = all X, 1 = only 0s, 2 = only 1s, 3 = both
  function automatic int block_kind(int p, int i, int b);
    bit z, o;
    z = 0; o = 0;
    for (int t = b * K; t < (b + 1) * K && t < L; t++) begin
      if (cube[p][i][t] == 0) z = 1;
      if (cube[p][i][t] == 1) o = 1;
    end
    return {o, z};
  endfunction

  function automatic void encode(int p);
    for (int i = 0; i < N; i++) begin
      byte known;      // value at the chain input after the previous block, X if unknown
      int  conv_pos;   // position of an X last bit of the previous LFSR-fed block, -1 if none
      known = X;
      conv_pos = -1;
      for (int t = 0; t < L; t++) dspec[p][i][t] = cube[p][i][t];
      for (int b = 0; b < B; b++) begin
        int kind, last;
        byte v;
        kind = block_kind(p, i, b);
        last = ((b + 1) * K < L ? (b + 1) * K : L) - 1;
        if (kind == 1 || kind == 2) begin
          v = (kind == 2) ? 1 : 0;
          if (known == v) hfl[p][i][b] = 1;
          else if (conv_pos >= 0) begin
            dspec[p][i][conv_pos] = v;    // conversion
            hfl[p][i][b] = 1;
            known = v;
          end else hfl[p][i][b] = 0;
        end else if (kind == 3) hfl[p][i][b] = 0;
        else begin
          int nk;
          nk = (b + 1 < B) ? block_kind(p, i, b + 1) : 0;
          if (nk == 1 || nk == 2) begin
            v = (nk == 2) ? 1 : 0;
            if (known == v) hfl[p][i][b] = 1;
            else begin
              hfl[p][i][b] = 0;
              dspec[p][i][last] = v;      // prepares the next block
            end
          end else hfl[p][i][b] = HOLD_DC ? 1 : X;
        end
        // value known at the end of this block
        if (hfl[p][i][b] == 1) begin
          conv_pos = -1;
        end else if (hfl[p][i][b] == 0) begin
          known = dspec[p][i][last];
          conv_pos = (dspec[p][i][last] == X) ? last : -1;
        end else begin
          known = X;
          conv_pos = -1;
        end
      end
    end
  endfunction

  // ---------------- symbolic LFSR and GF(2) solver ----------------
  logic [LL-1:0] outm[T][N + 1];   // output j in word w as a mask over seed bits

  function automatic void build_symbolic();
    logic [LL-1:0] s[LL], ns[LL];
    for (int k = 0; k < LL; k++) s[k] = LL'(1) << k;
    for (int w = 0; w < T; w++) begin
      for (int j = 0; j <= N; j++) outm[w][j] = s[(8 * j) % LL] ^ s[(11 * j + 83) % LL] ^ s[(13 * j + 173) % LL];
      ns[0] = s[255] ^ s[253] ^ s[250] ^ s[245];
      for (int k = 1; k < LL; k++) ns[k] = s[k - 1];
      s = ns;
    end
  endfunction

  logic [LL-1:0] basis[LL];
  bit            brhs[LL];
  bit            bval[LL];
  bit            consistent;

  function automatic void sys_clear();
    for (int k = 0; k < LL; k++) bval[k] = 0;
    consistent = 1;
  endfunction

  function automatic void sys_add(logic [LL-1:0] m, bit r);
    for (int k = LL - 1; k >= 0; k--) begin
      if (m[k]) begin
        if (bval[k]) begin
          m ^= basis[k];
          r ^= brhs[k];
        end else begin
          basis[k] = m;
          brhs[k] = r;
          bval[k] = 1;
          return;
        end
      end
    end
    if (r) consistent = 0;
  endfunction

  function automatic logic [LL-1:0] sys_solve();
    logic [LL-1:0] sd;
    for (int k = 0; k < LL; k += 32) sd[k +: 32] = $urandom;   // free variables random
    for (int k = 0; k < LL; k++)
      if (bval[k]) sd[k] = brhs[k] ^ (^(basis[k] & sd & ~(LL'(1) << k)));
    return sd;
  endfunction

  // ---------------- reference of the generated stream ----------------
  function automatic logic [LL-1:0] ref_next(logic [LL-1:0] s);
    return {s[LL-2:0], s[255] ^ s[253] ^ s[250] ^ s[245]};
  endfunction
  function automatic logic [N:0] ref_out(logic [LL-1:0] s);
    logic [N:0] o;
    for (int j = 0; j <= N; j++) o[j] = s[(8 * j) % LL] ^ s[(11 * j + 83) % LL] ^ s[(13 * j + 173) % LL];
    return o;
  endfunction

  // ---------------- flow ----------------
  longint spec_orig = 0, spec_data = 0, spec_hold = 0, spec_upd = 0;
  longint tr_dut = 0, tr_plain = 0, cycles = 0;
  int n_sets = 0, unsolved = 0, first_data = 0;
  localparam int BUDGET = LL - 10;   // equations allowed per seed

  initial begin
    build_symbolic();
    for (int p = 0; p < NP; p++) begin
      gen_cube(p);
      encode(p);
      if (EXAMPLES && p < 2) begin
        int nspec;
        nspec = 0;
        for (int b = 0; b < 4; b++) begin
          checks++;
          if (hfl[p][0][b] != ch2v(EX_FLAGS[p][b])) begin
            failures++;
            $display("example %0d block %0d: flag %0d exp %s", p + 1, b + 1, hfl[p][0][b], EX_FLAGS[p].substr(b, b));
          end
          if (hfl[p][0][b] != X) nspec++;
        end
        for (int t = 0; t < 16; t++) begin
          if (hfl[p][0][t / 4] == 0 && dspec[p][0][t] != X) nspec++;
          if (ch2v(EX_DATA[p][t]) != -1) begin
            checks++;
            if (dspec[p][0][t] != ch2v(EX_DATA[p][t])) begin
              failures++;
              $display("example %0d bit %0d: data %0d exp %s", p + 1, t, dspec[p][0][t], EX_DATA[p].substr(t, t));
            end
          end
        end
        // 7 specified bits become 3 hold flags + 2 data bits in the first
        // example and 4 hold flags + 4 data bits in the second
        checks++;
        if (nspec != (p == 0 ? 5 : 8)) begin failures++; $display("example %0d: %0d specified bits", p + 1, nspec); end
      end
      for (int i = 0; i < N; i++) for (int t = 0; t < L; t++) if (cube[p][i][t] != X) spec_orig++;
    end
    // hold-cube compatible sets of consecutive patterns; a pattern joins the
    // current set only if the merged cube still fits in the seed of the set's
    // first pattern (update flag + merged hold flags + its data bits <= BUDGET)
    for (int p = 0; p < NP; p++) begin
      bit ok;
      int nflags;
      ok = (p > 0);
      nflags = 0;
      if (ok)
        for (int i = 0; i < N; i++) for (int b = 0; b < B; b++) begin
          if (hfl[p][i][b] != X && mcube[p - 1][i][b] != X && hfl[p][i][b] != mcube[p - 1][i][b]) ok = 0;
          if (hfl[p][i][b] != X || mcube[p - 1][i][b] != X) nflags++;
        end
      if (ok && 1 + first_data + nflags > BUDGET) ok = 0;
      upd[p] = !ok;
      if (!ok) begin
        n_sets++;
        first_data = 0;
        for (int i = 0; i < N; i++) for (int t = 0; t < L; t++)
          if (hfl[p][i][t / K] == 0 && dspec[p][i][t] != X) first_data++;
        for (int i = 0; i < N; i++) for (int b = 0; b < B; b++) mcube[p][i][b] = hfl[p][i][b];
      end else
        for (int i = 0; i < N; i++) for (int b = 0; b < B; b++)
          mcube[p][i][b] = (hfl[p][i][b] != X) ? hfl[p][i][b] : mcube[p - 1][i][b];
    end
    // the whole set is sent with its first pattern: propagate the final merged cube back
    for (int p = NP - 2; p >= 0; p--)
      if (!upd[p + 1]) for (int i = 0; i < N; i++) for (int b = 0; b < B; b++) mcube[p][i][b] = mcube[p + 1][i][b];
    // seeds
    for (int p = 0; p < NP; p++) begin
      int off;
      sys_clear();
      sys_add(outm[0][N], upd[p]);
      spec_upd++;
      off = upd[p] ? B : 0;
      if (upd[p])
        for (int b = 0; b < B; b++) for (int i = 0; i < N; i++)
          if (mcube[p][i][b] != X) begin
            sys_add(outm[b][i], mcube[p][i][b][0]);
            spec_hold++;
          end
      for (int i = 0; i < N; i++) for (int t = 0; t < L; t++)
        if (mcube[p][i][t / K] == 0 && dspec[p][i][t] != X) begin
          sys_add(outm[off + t][i], dspec[p][i][t][0]);
          spec_data++;
        end
      checks++;
      if (!consistent) begin unsolved++; failures++; $display("pattern %0d: no seed", p); end
      seeds[p] = sys_solve();
      // conventional reseeding of the same cube: every specified bit from the LFSR
      sys_clear();
      for (int i = 0; i < N; i++) for (int t = 0; t < L; t++)
        if (cube[p][i][t] != X) sys_add(outm[t][i], cube[p][i][t][0]);
      plain_seeds[p] = sys_solve();
      if (consistent) begin
        logic [LL-1:0] s;
        logic [N:0] w, prev;
        s = plain_seeds[p];
        for (int t = 0; t < L; t++) begin
          w = ref_out(s);
          if (t > 0) for (int i = 0; i < N; i++) if (w[i] != prev[i]) tr_plain++;
          prev = w;
          s = ref_next(s);
        end
      end
    end
  end

  initial begin
    logic [N-1:0] prev_in;
    int p, shifts;
    bit started;
    string mode;
    started = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    p = 0;
    shifts = 0;
    while (p < NP) begin
      @(negedge clk);
      #1;
      cycles++;
      if (shift_en) begin
        if (shifts > 0) for (int i = 0; i < N; i++) if (scan_in[i] != prev_in[i]) tr_dut++;
        prev_in = scan_in;
        shifts++;
      end
      if (capture_en) begin
        for (int i = 0; i < N; i++) for (int t = 0; t < L; t++)
          if (cube[p][i][t] != X) begin
            checks++;
            if (cells[i][L - 1 - t] !== cube[p][i][t][0]) begin
              failures++;
              if (failures < 10) $display("pattern %0d chain %0d bit %0d: got %0b exp %0d", p, i, t, cells[i][L - 1 - t], cube[p][i][t]);
            end
          end
        checks++;
        if (update_flag !== upd[p]) begin failures++; $display("pattern %0d update flag", p); end
        for (int i = 0; i < N; i++) resp[i] = {$urandom, $urandom};
        p++;
        shifts = 0;
      end
      if (p < NP && (capture_en || (p == 0 && !started && cycles > 2))) begin
        started = 1;
        seed_valid = 1'b1;
        seed = seeds[p];
      end
      #1;
      if (seed_valid && seed_ready) begin
        @(posedge clk);
        #1 seed_valid = 1'b0;
      end
    end
    mode = HOLD_DC ? ", all-X blocks held" : ", all-X blocks free";
    $display("%s%s (%0d chains x %0d cells, %0d blocks per chain): patterns %0d, hold-cube compatible sets %0d", NAME, mode, N, L, B, NP, n_sets);
    $display("specified bits: original %0d; encoded %0d = update %0d + hold %0d + data %0d",
             spec_orig, spec_upd + spec_hold + spec_data, spec_upd, spec_hold, spec_data);
    $display("scan-in transitions: %0d with hold flags, %0d with conventional reseeding", tr_dut, tr_plain);
    $display("test cycles %0d, without hold-cube loads %0d (+%0.1f %%)", cycles, cycles - n_sets * B,
             100.0 * real'(n_sets * B) / real'(cycles - n_sets * B));
    // With one block per chain and all-X blocks left unspecified nothing can
    // be held (a held first block would keep the captured value), so the
    // reduction is only required when a chain has several blocks or all-X
    // blocks are held.
    checks++;
    if ((B > 1 || HOLD_DC) && tr_dut >= tr_plain) begin failures++; $display("no transition reduction"); end
    checks++;
    // first pattern: reset + 1 offer cycle; then (L + 1) per pattern + B per set
    if (cycles != 3 + NP * (L + 1) + n_sets * B) begin failures++; $display("cycle count %0d", cycles); end
    checks++;
    if ((!HOLD_DC && !EXAMPLES && n_sets == NP) || n_sets == 0) begin failures++; $display("no hold cube reuse"); end
    done = 1'b1;
  end
endmodule
