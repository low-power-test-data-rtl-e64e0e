// Hold-flag shift register (HF-SR) of one scan chain.
//
// Holds the N_BLOCKS hold flags of its chain, one per block. While a new hold
// cube is loaded (`load`), the flag from the LFSR enters at the top and the
// register shifts towards bit 0, so after N_BLOCKS loads the first flag shifted
// in sits in bit 0 and belongs to the first block scanned in. During scan-in
// the controller pulses `rotate` at the end of every block; the register then
// rotates by one place, so `hold` (bit 0) is always the flag of the current
// block, and after a whole pattern (N_BLOCKS rotations) the hold cube is back
// in place and can be reused by the next pattern when no update is sent.
// `load` wins over `rotate`. Reset clears all flags (every block then takes
// LFSR data).
//
// The register's size of one bit per block and per chain follows the
// paper; the loading order and the rotation are this design's choices.
module hf_sr
  import lpr_pkg::*;
#(
  parameter int unsigned N_BLOCKS = DEF_N_BLOCKS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                din,
  input  logic                rotate,
  output logic                hold,
  output logic [N_BLOCKS-1:0] flags
);

  logic [N_BLOCKS-1:0] q;

  if (N_BLOCKS == 1) begin : g_one
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    q <= '0;
      else if (load) q <= din;
    end
  end else begin : g_many
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        q <= '0;
      else if (load)     q <= {din, q[N_BLOCKS-1:1]};
      else if (rotate)   q <= {q[0], q[N_BLOCKS-1:1]};
    end
  end

  assign hold  = q[0];
  assign flags = q;

endmodule
