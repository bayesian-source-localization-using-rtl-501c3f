// normalization: the normalization module of the stochastic Bayesian module,
// which divides P1 by P1 + P2 with two AND gates and a counter.
//
// The counter value is turned back into a stream P_o by its own SNG. The
// counter has one excitatory input E1 = P1 and two inhibitory inputs
// I1 = P1 & P_o and I2 = P2 & P_o; each clock it moves by E1 - I1 - I2
// (+1, 0, -1 or -2), exactly the four cases of the published rule. On average it
// drifts by P1 - P1*P_o - P2*P_o, which is zero at P_o = P1 / (P1 + P2), so the
// counter settles at the Bayes posterior and its 8-bit value is P_t
// (value v stands for (v + 1) / 256, the scale of the SNGs).
//
// This design's own choices: the counter saturates at 0 and at P_TOP instead of
// wrapping, it is reset to P_INIT, and it only moves while en is high. P_TOP
// is 254, one below full scale, because a prior of 255 turns into a stream of
// all ones: P2 is then always 0 and the cell would keep posterior 1.0 whatever
// the photodiodes report (Bayes' rule with a prior of exactly 1). With a top of 254
// a cell that has collected many detections can still be argued down.
//
// Interface: p1 and p2 are stochastic bits sampled every clock with en = 1;
// po is the registered counter value.
module normalization
  import bslm_pkg::*;
#(
  parameter logic [7:0] P_INIT = 8'd128,
  parameter logic [7:0] P_TOP = 8'd254,
  parameter logic [LW-1:0] MASK = 16'hB147,
  parameter logic [LW-1:0] SEED = 16'h0001
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       p1,
  input  logic       p2,
  output logic [7:0] po
);

  logic po_s;   // stochastic version of the counter value
  logic e1, i1, i2;
  logic signed [9:0] next;

  sng #(.MASK(MASK), .SEED(SEED)) u_sng_po (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (po),
    .bit_o(po_s)
  );

  always_comb begin
    e1 = p1;
    i1 = p1 & po_s;
    i2 = p2 & po_s;
    next = $signed({2'b00, po}) + $signed(10'(e1)) - $signed(10'(i1)) - $signed(10'(i2));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) po <= P_INIT;
    else if (en) begin
      if (next < 0) po <= 8'd0;
      else if (next > $signed({2'b00, P_TOP})) po <= P_TOP;
      else po <= next[7:0];
    end
  end

endmodule
