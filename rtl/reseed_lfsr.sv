// Reseedable LFSR with a multi-output XOR tap network.
//
// A seed is loaded in parallel when `load` is high; afterwards the register
// advances one state per cycle in which `step` is high (`load` wins over
// `step`). The LFSR is of Fibonacci type: the state shifts towards the MSB and
// the new LSB is the XOR of the state bits selected by TAPS. Output j is the
// XOR of state bits 8j, 11j+83 and 13j+173 (modulo LFSR_LEN), see
// lpr_pkg::out_tap: taps spread over the register with a different spacing
// for every output, so that scan chains do not receive time-shifted copies of
// one another and short patterns still depend on the whole seed. Outputs are combinational from the current state.
//
// Using one LFSR for hold flags and data bits follows the paper; the
// length, the polynomial and the tap network are this design's choices (any
// reseeding LFSR can be used, the seed computation only has to model the same
// linear machine).
module reseed_lfsr
  import lpr_pkg::*;
#(
  parameter int unsigned LFSR_LEN = DEF_LFSR_LEN,
  parameter int unsigned N_OUT    = DEF_N_CHAINS + 1,
  parameter logic [LFSR_LEN-1:0] TAPS = LFSR_LEN'(DEF_LFSR_TAPS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [LFSR_LEN-1:0] seed,
  input  logic                step,
  output logic [N_OUT-1:0]    out,
  output logic [LFSR_LEN-1:0] state
);

  logic [LFSR_LEN-1:0] s;
  logic                fb;

  assign fb    = ^(s & TAPS);
  assign state = s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s <= '0;
    else if (load) s <= seed;
    else if (step) s <= {s[LFSR_LEN-2:0], fb};
  end

  always_comb begin
    for (int unsigned j = 0; j < N_OUT; j++) begin
      out[j] = s[out_tap(j, 0, LFSR_LEN)] ^ s[out_tap(j, 1, LFSR_LEN)] ^ s[out_tap(j, 2, LFSR_LEN)];
    end
  end

endmodule
