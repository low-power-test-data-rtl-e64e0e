// Shared types and constants of the low-power LFSR-reseeding decompressor.
//
// The decompressor fills N_CHAINS scan chains of CHAIN_LEN cells each. Every
// chain is cut into N_BLOCKS blocks and each block carries one hold flag:
// 0 = the block is loaded with LFSR data, 1 = the chain input is held at the
// last value shifted in. The default sizes are those of the s38417 row of the
// published results (31 scan chains, 185 blocks in total, i.e. a 6-bit hold
// flag shift register per chain). The chain length (54) follows from the
// 1664 scan inputs of s38417 spread over 31 chains; the LFSR length, its
// feedback polynomial and the output tap network are this design's choice.
// The LFSR must be longer than the number of specified bits any one seed has
// to encode: the s38417 results average about 116 for a pattern that also
// brings a new hold cube, so 256 bits leaves room for the larger ones.
package lpr_pkg;

  // Default configuration.
  localparam int unsigned DEF_N_CHAINS  = 31;
  localparam int unsigned DEF_CHAIN_LEN = 54;
  localparam int unsigned DEF_N_BLOCKS  = 6;
  localparam int unsigned DEF_LFSR_LEN  = 256;

  // Feedback taps of the default 256-bit LFSR: bit k of the mask set = state
  // bit k takes part in the feedback XOR. Bits 255, 253, 250 and 245 give the
  // recurrence of the primitive polynomial x^256 + x^10 + x^5 + x^2 + 1
  // (the reciprocal of x^256 + x^254 + x^251 + x^246 + 1), so a non-zero
  // seed never falls into a short cycle.
  localparam logic [255:0] DEF_LFSR_TAPS = (256'd1 << 255) | (256'd1 << 253)
                                         | (256'd1 << 250) | (256'd1 << 245);

  // Controller states.
  typedef enum logic [2:0] {
    ST_IDLE,     // waiting for a seed
    ST_FIRST,    // first LFSR word of a pattern: update flag decides the phase
    ST_HOLD,     // shifting a new hold cube into the HF-SRs
    ST_SCAN,     // shifting test data into the scan chains
    ST_CAPTURE   // one capture cycle; a new seed may be taken at the same time
  } ctrl_state_t;

  // Output tap network of the LFSR: output j is the XOR of three state bits,
  // 8j, 11j+83 and 13j+173 (all modulo the LFSR length). The taps are spread
  // over the whole register, so that a pattern of a few dozen cycles already
  // depends on every seed bit, and the tap spacing differs from output to
  // output, so that no scan chain receives a delayed copy of another one.
  // For the default 256-bit LFSR with 32 outputs the three indices of an
  // output are always distinct.
  function automatic int unsigned out_tap(int unsigned j, int unsigned k, int unsigned len);
    case (k)
      0:       return (8 * j) % len;
      1:       return (11 * j + 83) % len;
      default: return (13 * j + 173) % len;
    endcase
  endfunction

endpackage
