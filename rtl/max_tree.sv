// max_tree: the max module. Finds the largest of N 8-bit posteriors and
// returns it with the tag (grid coordinate) that came with it.
//
// A binary tree of comparators, as the published design proposes, padded to the next
// power of two with zero-valued leaves. Each node passes on the larger of its
// two children; on a tie the child with the lower leaf index wins, so padding
// never wins. A register after every level (this design's choice) keeps each
// clock to one comparator; the result appears LEVELS = ceil(log2 N) clocks
// after valid_i, flagged by valid_o. The tree samples its inputs every clock;
// valid_i only travels along the pipeline to mark which answer is wanted, so
// one vector per clock can be pushed through.
module max_tree
  import bslm_pkg::*;
#(
  parameter int unsigned N  = 1600,
  parameter int unsigned TW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_i,
  input  prob_t         vals [N],
  input  logic [TW-1:0] tags [N],
  output logic          valid_o,
  output prob_t         max_val,
  output logic [TW-1:0] max_tag
);

  localparam int unsigned LEVELS = (N <= 1) ? 1 : $clog2(N);
  localparam int unsigned NP = 1 << LEVELS;

  prob_t         leaf_v [NP];
  logic [TW-1:0] leaf_t [NP];

  for (genvar i = 0; i < NP; i++) begin : g_leaf
    if (i < N) begin : g_real
      assign leaf_v[i] = vals[i];
      assign leaf_t[i] = tags[i];
    end else begin : g_pad
      assign leaf_v[i] = '0;
      assign leaf_t[i] = '0;
    end
  end

  // Level l compares the 2*W results of the level below into W winners.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned W = NP >> (l + 1);
    prob_t         cv [2*W];
    logic [TW-1:0] ct [2*W];
    prob_t         v  [W];
    logic [TW-1:0] t  [W];
    logic          vld;

    if (l == 0) begin : g_first
      assign cv = leaf_v;
      assign ct = leaf_t;
      always_ff @(posedge clk) begin
        if (!rst_n) vld <= 1'b0;
        else vld <= valid_i;
      end
    end else begin : g_next
      assign cv = g_lvl[l-1].v;
      assign ct = g_lvl[l-1].t;
      always_ff @(posedge clk) begin
        if (!rst_n) vld <= 1'b0;
        else vld <= g_lvl[l-1].vld;
      end
    end

    for (genvar i = 0; i < W; i++) begin : g_node
      always_ff @(posedge clk) begin
        if (cv[2*i+1] > cv[2*i]) begin
          v[i] <= cv[2*i+1];
          t[i] <= ct[2*i+1];
        end else begin
          v[i] <= cv[2*i];
          t[i] <= ct[2*i];
        end
      end
    end
  end

  assign valid_o = g_lvl[LEVELS-1].vld;
  assign max_val = g_lvl[LEVELS-1].v[0];
  assign max_tag = g_lvl[LEVELS-1].t[0];

endmodule
