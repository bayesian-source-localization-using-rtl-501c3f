// sng: stochastic number generator. Turns the 8-bit binary number x into a
// bit stream whose fraction of ones is about (x + 1) / 256.
//
// As in the published design, an LFSR gives an 8-bit random number r each clock and a
// comparator outputs 1 when r <= x. Here r is the top byte of a 16-bit LFSR
// (this design's choice; see bslm_pkg): over one period of 65535 clocks r = 0
// occurs 255 times and every other value 256 times, so the stream holds
// exactly 256 * x + 255 ones per period. x = 255 gives all ones; x = 0 gives
// a one in 257 clocks on average.
//
// Interface: x may change at any clock; bit_o is combinational from x and the
// registered LFSR state.
module sng
  import bslm_pkg::*;
#(
  parameter logic [LW-1:0] MASK = 16'hB147,
  parameter logic [LW-1:0] SEED = 16'h0001
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] x,
  output logic       bit_o
);

  logic [LW-1:0] r;

  lfsr #(.WIDTH(LW), .MASK(MASK), .SEED(SEED)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .r    (r)
  );

  assign bit_o = (r[LW-1 -: 8] <= x);

endmodule
