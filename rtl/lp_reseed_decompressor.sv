// Low-power test decompressor for LFSR reseeding with hold flags.
//
// Each scan chain is cut into N_BLOCKS blocks. A block whose hold flag is 1
// receives a constant value (the chain input is held at the bit shifted in
// last), a block whose hold flag is 0 receives LFSR data. Blocks without a
// transition therefore cause no switching in the scan chain and need no
// specified LFSR bits, which lowers both scan-in power and the number of bits
// the seeds must encode. Hold flags are shared by many test patterns: each
// pattern's LFSR sequence begins with an update flag; only when it is 1 does
// a new hold cube (N_BLOCKS flags per chain) follow, which is shifted into the
// per-chain hold-flag shift registers (HF-SRs) before the test data.
//
// Structure (all from the paper except where noted): one reseedable LFSR
// with N_CHAINS data outputs and one update-flag output (tap network and
// length chosen here), one HF-SR and one 2-to-1 MUX per chain, and a small
// FSM with a bit counter and the update-flag flip-flop.
//
// Interface: the tester offers one seed per pattern on seed/seed_valid and it
// is taken when seed_ready is high (valid/ready handshake; the seed must stay
// stable while it waits). scan_in drives the serial inputs of the chains and
// scan_head returns the value of each chain's first cell. The chains must
// shift exactly in the cycles where shift_en is high and capture where
// capture_en is high; in all other cycles they keep their contents.
//
// Timing per pattern with seeds back to back: 1 update-flag/first cycle
// folded into the first hold or shift cycle, N_BLOCKS hold-load cycles if the
// update flag is 1, CHAIN_LEN shift cycles, 1 capture cycle (overlapping the
// next seed load).
module lp_reseed_decompressor
  import lpr_pkg::*;
#(
  parameter int unsigned N_CHAINS  = DEF_N_CHAINS,
  parameter int unsigned CHAIN_LEN = DEF_CHAIN_LEN,
  parameter int unsigned N_BLOCKS  = DEF_N_BLOCKS,
  parameter int unsigned LFSR_LEN  = DEF_LFSR_LEN,
  parameter logic [LFSR_LEN-1:0] LFSR_TAPS = LFSR_LEN'(DEF_LFSR_TAPS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                seed_valid,
  input  logic [LFSR_LEN-1:0] seed,
  output logic                seed_ready,
  input  logic [N_CHAINS-1:0] scan_head,
  output logic [N_CHAINS-1:0] scan_in,
  output logic                shift_en,
  output logic                capture_en,
  output logic                update_flag,
  output logic                hold_loading,
  output logic [N_CHAINS-1:0] hold_now
);

  logic [N_CHAINS:0]   lfsr_out;   // [N_CHAINS-1:0] chain data, [N_CHAINS] update flag
  logic                lfsr_load, lfsr_step, hf_load, hf_rotate;

  reseed_lfsr #(
    .LFSR_LEN (LFSR_LEN),
    .N_OUT    (N_CHAINS + 1),
    .TAPS     (LFSR_TAPS)
  ) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (lfsr_load),
    .seed  (seed),
    .step  (lfsr_step),
    .out   (lfsr_out),
    .state ()
  );

  hold_ctrl #(
    .CHAIN_LEN (CHAIN_LEN),
    .N_BLOCKS  (N_BLOCKS)
  ) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .seed_valid  (seed_valid),
    .seed_ready  (seed_ready),
    .lfsr_load   (lfsr_load),
    .lfsr_step   (lfsr_step),
    .uf_bit      (lfsr_out[N_CHAINS]),
    .update_flag (update_flag),
    .hf_load     (hf_load),
    .hf_rotate   (hf_rotate),
    .shift_en    (shift_en),
    .capture_en  (capture_en),
    .state       ()
  );

  for (genvar i = 0; i < N_CHAINS; i++) begin : g_chain
    hf_sr #(
      .N_BLOCKS (N_BLOCKS)
    ) u_hf_sr (
      .clk    (clk),
      .rst_n  (rst_n),
      .load   (hf_load),
      .din    (lfsr_out[i]),
      .rotate (hf_rotate),
      .hold   (hold_now[i]),
      .flags  ()
    );
  end

  hold_mux #(
    .N_CHAINS (N_CHAINS)
  ) u_mux (
    .hold      (hold_now),
    .lfsr_bit  (lfsr_out[N_CHAINS-1:0]),
    .scan_head (scan_head),
    .scan_in   (scan_in)
  );

  assign hold_loading = hf_load;

  // Tester side of the seed handshake: an offered seed stays until taken.
  a_seed_stable: assert property (@(posedge clk) disable iff (!rst_n)
    seed_valid && !seed_ready |=> seed_valid && $stable(seed));

endmodule
