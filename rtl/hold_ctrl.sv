// FSM controller of the low-power decompressor, with its bit counter and the
// 1-bit update-flag flip-flop.
//
// One test pattern is produced from one seed:
//   * seed cycle   - `seed_ready` is high in ST_IDLE and ST_CAPTURE; a seed
//                    offered with `seed_valid` is loaded into the LFSR
//                    (`lfsr_load`).
//   * ST_FIRST     - the first LFSR word is on the LFSR outputs. Its
//                    update-flag bit `uf_bit` is stored in the update-flag
//                    flip-flop. If it is 1 this cycle is the first of
//                    N_BLOCKS hold-flag load cycles (`hf_load`), otherwise it
//                    is already the first scan shift cycle (`shift_en`).
//   * ST_HOLD      - remaining hold-flag load cycles; the scan chains stand
//                    still.
//   * ST_SCAN      - CHAIN_LEN shift cycles in total. `hf_rotate` marks the
//                    last cycle of each block of BLOCK_LEN = ceil(CHAIN_LEN /
//                    N_BLOCKS) cycles (the last block may be shorter).
//   * ST_CAPTURE   - one capture cycle (`capture_en`); the next seed may be
//                    accepted in the same cycle.
// The LFSR advances (`lfsr_step`) in every hold-load and shift cycle, so hold
// flags and data bits come from one LFSR sequence. With seeds offered back to
// back a pattern takes CHAIN_LEN + 1 cycles, plus N_BLOCKS when it carries a
// new hold cube; the update flag itself costs no cycle. That matches the test
// time increase the paper reports (N_BLOCKS cycles per hold cube).
//
// The paper gives the controller's parts (a bit counter, small
// combinational logic, the update-flag flip-flop) and the data format (update
// flag, optional hold cube, test data); the state encoding, the handshake and
// the one-cycle capture are this design's choices.
module hold_ctrl
  import lpr_pkg::*;
#(
  parameter int unsigned CHAIN_LEN = DEF_CHAIN_LEN,
  parameter int unsigned N_BLOCKS  = DEF_N_BLOCKS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic seed_valid,
  output logic seed_ready,
  output logic lfsr_load,
  output logic lfsr_step,
  input  logic uf_bit,
  output logic update_flag,
  output logic hf_load,
  output logic hf_rotate,
  output logic shift_en,
  output logic capture_en,
  output ctrl_state_t state
);

  localparam int unsigned BLOCK_LEN = (CHAIN_LEN + N_BLOCKS - 1) / N_BLOCKS;
  localparam int unsigned CNT_MAX   = (CHAIN_LEN > N_BLOCKS) ? CHAIN_LEN : N_BLOCKS;
  localparam int unsigned CW        = $clog2(CNT_MAX + 1);
  localparam int unsigned BW        = $clog2(BLOCK_LEN + 1);

  if (N_BLOCKS < 1 || CHAIN_LEN < 1 || (CHAIN_LEN + BLOCK_LEN - 1) / BLOCK_LEN != N_BLOCKS) begin : g_bad_cfg
    $error("hold_ctrl: CHAIN_LEN=%0d cannot be cut into N_BLOCKS=%0d blocks of equal length", CHAIN_LEN, N_BLOCKS);
  end

  ctrl_state_t st, st_nx;
  logic [CW-1:0] cnt, cnt_nx, cnt_eff;   // bit counter
  logic [BW-1:0] bpos, bpos_nx, bpos_eff; // position inside the current block
  logic          uf_q;                    // update-flag flip-flop
  logic          hold_cyc, scan_cyc, block_end, last_scan, last_hold;

  assign state       = st;
  assign update_flag = uf_q;
  assign seed_ready  = (st == ST_IDLE) || (st == ST_CAPTURE);
  assign lfsr_load   = seed_ready && seed_valid;

  always_comb begin
    hold_cyc  = (st == ST_HOLD) || (st == ST_FIRST && uf_bit);
    scan_cyc  = (st == ST_SCAN) || (st == ST_FIRST && !uf_bit);
    cnt_eff   = (st == ST_FIRST) ? '0 : cnt;
    bpos_eff  = (st == ST_FIRST) ? '0 : bpos;
    last_hold = (cnt_eff == CW'(N_BLOCKS - 1));
    last_scan = (cnt_eff == CW'(CHAIN_LEN - 1));
    block_end = scan_cyc && ((bpos_eff == BW'(BLOCK_LEN - 1)) || last_scan);

    hf_load    = hold_cyc;
    shift_en   = scan_cyc;
    hf_rotate  = block_end;
    capture_en = (st == ST_CAPTURE);
    lfsr_step  = hold_cyc || scan_cyc;

    st_nx   = st;
    cnt_nx  = cnt;
    bpos_nx = bpos;
    if (hold_cyc) begin
      if (last_hold) begin
        st_nx  = ST_SCAN;
        cnt_nx = '0;
      end else begin
        st_nx  = ST_HOLD;
        cnt_nx = cnt_eff + 1'b1;
      end
      bpos_nx = '0;
    end else if (scan_cyc) begin
      bpos_nx = block_end ? '0 : bpos_eff + 1'b1;
      if (last_scan) begin
        st_nx  = ST_CAPTURE;
        cnt_nx = '0;
      end else begin
        st_nx  = ST_SCAN;
        cnt_nx = cnt_eff + 1'b1;
      end
    end else if (seed_ready) begin
      st_nx = lfsr_load ? ST_FIRST : ST_IDLE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= ST_IDLE;
      cnt  <= '0;
      bpos <= '0;
      uf_q <= 1'b0;
    end else begin
      st   <= st_nx;
      cnt  <= cnt_nx;
      bpos <= bpos_nx;
      if (st == ST_FIRST) uf_q <= uf_bit;
    end
  end

  // Only one of the three datapath actions may happen in a cycle.
  a_one_action: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({hf_load, shift_en, capture_en}));
  // A seed is only taken between patterns.
  a_load_between: assert property (@(posedge clk) disable iff (!rst_n)
    lfsr_load |-> !lfsr_step);

endmodule
