// stoch_bayes: the stochastic Bayesian module. Computes the posterior
//   P_t = L1*P_{t-1} / (L1*P_{t-1} + L0*(1 - P_{t-1}))      (Bayes' rule)
// of one grid from its prior and the photodiode bit z_j chosen for it.
//
// Structure as published: three SNGs turn alpha, alpha*beta and the
// prior into streams; two likelihood multiplexers select alpha_s or 1-alpha_s
// (L1) and alpha*beta_s or 1-alpha*beta_s (L0) with z_j; two AND gates form
// P1 = L1 & P_{t-1,s} and P2 = L0 & ~P_{t-1,s}; the normalization module turns
// P1/(P1+P2) into the 8-bit counter value post.
//
// The LFSR polynomials and seeds are picked from PATH_ID (bslm_pkg) so the four
// SNGs of a module, and the modules of neighbouring paths, run uncorrelated;
// that choice is this design's own.
//
// Timing: the prior must be held while en is high; post converges towards the
// posterior over a few hundred clocks and is read at the end of a time step.
module stoch_bayes
  import bslm_pkg::*;
#(
  parameter int unsigned PATH_ID = 0,
  parameter logic [7:0] P_INIT = 8'd128
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  prob_t alpha,
  input  prob_t alpha_beta,
  input  prob_t prior,
  input  logic  z,
  output prob_t post
);

  logic alpha_s, alpha_beta_s, prior_s;
  logic l1_s, l0_s;
  logic p1, p2;

  sng #(.MASK(lfsr_mask(PATH_ID, SNG_ALPHA)), .SEED(lfsr_seed(PATH_ID, SNG_ALPHA))) u_sng_alpha (
    .clk(clk), .rst_n(rst_n), .x(alpha), .bit_o(alpha_s)
  );
  sng #(.MASK(lfsr_mask(PATH_ID, SNG_ALPHA_BETA)), .SEED(lfsr_seed(PATH_ID, SNG_ALPHA_BETA))) u_sng_alpha_beta (
    .clk(clk), .rst_n(rst_n), .x(alpha_beta), .bit_o(alpha_beta_s)
  );
  sng #(.MASK(lfsr_mask(PATH_ID, SNG_PRIOR)), .SEED(lfsr_seed(PATH_ID, SNG_PRIOR))) u_sng_prior (
    .clk(clk), .rst_n(rst_n), .x(prior), .bit_o(prior_s)
  );

  likelihood u_l1 (.a_s(alpha_s),      .z(z), .l_s(l1_s));
  likelihood u_l0 (.a_s(alpha_beta_s), .z(z), .l_s(l0_s));

  always_comb begin
    p1 = l1_s & prior_s;
    p2 = l0_s & ~prior_s;
  end

  normalization #(
    .P_INIT(P_INIT),
    .MASK  (lfsr_mask(PATH_ID, SNG_POST)),
    .SEED  (lfsr_seed(PATH_ID, SNG_POST))
  ) u_norm (
    .clk(clk), .rst_n(rst_n), .en(en), .p1(p1), .p2(p2), .po(post)
  );

endmodule
