// lfsr: free-running maximal-length linear feedback shift register, the
// pseudo-random source of a stochastic number generator.
//
// Galois form: each clock the register shifts right and, when the bit shifted
// out is 1, is XORed with MASK. With a primitive mask (bslm_pkg holds sixteen
// for WIDTH = 16) it visits every non-zero WIDTH-bit value once per
// 2^WIDTH - 1 clocks. The published design only says an LFSR is used; the Galois form,
// the width, the masks and the seeds are this design's choice.
//
// Interface: clk, rst_n (synchronous, active low, loads SEED), r (current
// state). Timing: r changes every clock after reset.
module lfsr #(
  parameter int unsigned WIDTH = 16,
  parameter logic [WIDTH-1:0] MASK = 16'hB147,
  parameter logic [WIDTH-1:0] SEED = 16'h0001
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] r
);

  initial assert (SEED != '0) else $error("lfsr: SEED must be non-zero");

  always_ff @(posedge clk) begin
    if (!rst_n) r <= SEED;
    else if (r[0]) r <= (r >> 1) ^ MASK;
    else r <= r >> 1;
  end

endmodule
