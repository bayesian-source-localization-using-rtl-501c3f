// inference_path: everything the design computes for one grid cell.
//
// A triangulation module picks the photodiode bit of the sector that holds
// grid (GX, GY) as seen from the UGV; a stochastic Bayesian module turns the
// prior and that bit into the posterior; an 8-bit register holds the prior
// P_{t-1} and feeds it back. This is the structure of one row of the
// architecture drawing.
//
// Timing (this design's choice, the published design gives none): during a
// time step en is high for N_SC clocks while the register holds the prior
// steady and the counter inside the Bayesian module settles; a one-clock load
// pulse then copies the counter into the register, making P_t the next step's
// prior. Reset puts P_INIT in both.
module inference_path
  import bslm_pkg::*;
#(
  parameter logic [7:0]  GX = 8'd1,
  parameter logic [7:0]  GY = 8'd1,
  parameter int unsigned PATH_ID = 0,
  parameter logic [7:0]  P_INIT = 8'd128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             load,
  input  pos_t             x_ugv,
  input  logic [NSECT-1:0] z,
  input  prob_t            alpha,
  input  prob_t            alpha_beta,
  output prob_t            prior,
  output prob_t            post
);

  logic [2:0] sector;
  logic       z_j;

  triangulation u_tri (
    .x_ugv (x_ugv),
    .x_g   ('{x: GX, y: GY}),
    .z     (z),
    .sector(sector),
    .z_j   (z_j)
  );

  stoch_bayes #(.PATH_ID(PATH_ID), .P_INIT(P_INIT)) u_bayes (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .alpha     (alpha),
    .alpha_beta(alpha_beta),
    .prior     (prior),
    .z         (z_j),
    .post      (post)
  );

  // prior register (Reg)
  always_ff @(posedge clk) begin
    if (!rst_n) prior <= P_INIT;
    else if (load) prior <= post;
  end

endmodule
