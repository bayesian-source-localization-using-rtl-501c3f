// bslm_pkg: widths, types and constants shared by the stochastic Bayesian
// source-localisation design.
//
// Probabilities are 8-bit unsigned numbers, the 8-bit fixed-point format used
// throughout the design; the stochastic number generators read a value v as
// the probability (v + 1) / 256, so 255 is 1.0 and 0 is 1/257. Grid and UGV positions
// are 8-bit grid indices packed as {x, y} in 16 bits, counted from 1 as in the
// arena drawing (grid (1,1) is the lower-left cell).
//
// The LFSR size, tap masks and the seed function are this design's own choice:
// every stochastic number generator inside one inference path gets a different
// maximal-length 16-bit polynomial, and paths differ in seed, so that streams
// that are ANDed together are not correlated. With 8-bit LFSRs, whose
// sequences all share the period 255, the streams of one module correlate
// enough to move the posterior by up to 20 of 255.
package bslm_pkg;

  localparam int unsigned PW = 8;   // probability width
  localparam int unsigned CW = 8;   // one coordinate
  localparam int unsigned NSECT = 8; // photodiode sectors

  typedef logic [PW-1:0] prob_t;

  typedef struct packed {
    logic [CW-1:0] x;
    logic [CW-1:0] y;
  } pos_t;

  // Width of the LFSR state behind each stochastic number generator. The
  // random number compared with an 8-bit input is the top byte of the state.
  localparam int unsigned LW = 16;

  // Sixteen 16-bit Galois-LFSR masks, each giving the full period 65535.
  localparam logic [LW-1:0] LFSR_MASKS [16] = '{
    16'h8430, 16'h8C91, 16'h8D35, 16'h8F1F, 16'h996C, 16'h9AA5, 16'h9E49, 16'h9F69,
    16'hA8EF, 16'hAAD7, 16'hB147, 16'hEA4C, 16'hED65, 16'hF492, 16'hF528, 16'hF857
  };

  // SNG roles inside one stochastic Bayesian module
  typedef enum int unsigned {
    SNG_ALPHA = 0,
    SNG_ALPHA_BETA = 1,
    SNG_PRIOR = 2,
    SNG_POST = 3
  } sng_role_e;

  // Mask of SNG `role` in path `path`: the four roles of one path use four
  // different polynomials.
  function automatic logic [LW-1:0] lfsr_mask(int unsigned path, int unsigned role);
    return LFSR_MASKS[(path + 4 * role) % 16];
  endfunction

  // Non-zero seed of SNG `role` in path `path`.
  function automatic logic [LW-1:0] lfsr_seed(int unsigned path, int unsigned role);
    return LW'((path * 2909 + role * 7151) % 65535 + 1);
  endfunction

endpackage
