// Scan-input multiplexers, one 2-to-1 MUX at the entrance of every scan chain.
//
// When the hold flag of a chain's current block is 0 the chain receives the
// LFSR bit; when it is 1 it receives `scan_head`, the output of its own first
// scan cell, i.e. the bit shifted in last, so the chain input stays constant
// for the whole block and the block causes no transitions. Purely
// combinational. Taking the held value from the first scan cell (rather than
// from an extra register) keeps all added logic at the chain inputs, as the
// paper requires; the exact feedback source is this design's choice.
module hold_mux
  import lpr_pkg::*;
#(
  parameter int unsigned N_CHAINS = DEF_N_CHAINS
) (
  input  logic [N_CHAINS-1:0] hold,
  input  logic [N_CHAINS-1:0] lfsr_bit,
  input  logic [N_CHAINS-1:0] scan_head,
  output logic [N_CHAINS-1:0] scan_in
);

  always_comb begin
    for (int unsigned i = 0; i < N_CHAINS; i++) begin
      scan_in[i] = hold[i] ? scan_head[i] : lfsr_bit[i];
    end
  end

endmodule
