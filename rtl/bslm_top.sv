// bslm_top: Bayesian source localisation with stochastic computing.
//
// The arena is a K x K grid and every cell gets its own inference path
// (triangulation, stochastic Bayesian module, prior register), all running in
// parallel. Each time step the eight photodiode bits z and the UGV position
// are applied with start; every path selects the bit of the sector that holds
// its cell, updates its cell's probability of holding the source by Bayes'
// rule in the stochastic domain, and the max tree returns the cell
// with the highest posterior as the estimate x_s. This structure follows the
// published design; the step sequencing (bslm_ctrl) and all handshakes are this
// design's own.
//
// Interface: clk, rst_n (synchronous, active low; every prior becomes
// P_INIT); start with x_ugv = {x, y} (grid indices 1..K) and z (z[j-1] is
// photodiode j); alpha and alpha_beta are the probabilities alpha and
// alpha*beta as 8-bit fractions of 255 and must stay steady during a step.
// done pulses once per step with x_ugv-style coordinates x_s of the most
// probable cell and its posterior p_max; both hold until the next done.
// Timing: 1 + N_SC + 1 + ceil(log2(K*K)) clocks from start to done.
module bslm_top
  import bslm_pkg::*;
#(
  parameter int unsigned K = 40,
  parameter int unsigned N_SC = 2048,
  parameter logic [7:0] P_INIT = 8'd128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  pos_t             x_ugv,
  input  logic [NSECT-1:0] z,
  input  prob_t            alpha,
  input  prob_t            alpha_beta,
  output logic             busy,
  output logic             done,
  output pos_t             x_s,
  output prob_t            p_max
);

  localparam int unsigned NG = K * K;

  pos_t             x_ugv_q;
  logic [NSECT-1:0] z_q;
  logic             en, load, tree_valid;
  prob_t            post  [NG];
  prob_t            prior [NG];
  logic [15:0]      tags  [NG];
  prob_t            tree_val;
  logic [15:0]      tree_tag;

  bslm_ctrl #(.N_SC(N_SC)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .x_ugv_i   (x_ugv),
    .z_i       (z),
    .tree_valid(tree_valid),
    .x_ugv_q   (x_ugv_q),
    .z_q       (z_q),
    .en        (en),
    .load      (load),
    .busy      (busy)
  );

  for (genvar k = 0; k < K; k++) begin : g_x
    for (genvar l = 0; l < K; l++) begin : g_y
      localparam int unsigned IDX = k * K + l;
      inference_path #(
        .GX     (8'(k + 1)),
        .GY     (8'(l + 1)),
        .PATH_ID(IDX),
        .P_INIT (P_INIT)
      ) u_path (
        .clk       (clk),
        .rst_n     (rst_n),
        .en        (en),
        .load      (load),
        .x_ugv     (x_ugv_q),
        .z         (z_q),
        .alpha     (alpha),
        .alpha_beta(alpha_beta),
        .prior     (prior[IDX]),
        .post      (post[IDX])
      );
      assign tags[IDX] = {8'(k + 1), 8'(l + 1)};
    end
  end

  max_tree #(.N(NG), .TW(16)) u_max (
    .clk    (clk),
    .rst_n  (rst_n),
    .valid_i(load),
    .vals   (post),
    .tags   (tags),
    .valid_o(tree_valid),
    .max_val(tree_val),
    .max_tag(tree_tag)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_s   <= '0;
      p_max <= '0;
      done  <= 1'b0;
    end else begin
      done <= tree_valid;
      if (tree_valid) begin
        x_s   <= tree_tag;
        p_max <= tree_val;
      end
    end
  end

endmodule
