// likelihood: the likelihood module of the stochastic Bayesian module.
//
// It is a 2:1 multiplexer whose select line is the photodiode bit z_j: with
// z_j = 1 it passes the stochastic stream a_s (alpha or alpha*beta), with
// z_j = 0 the inverted stream 1 - a_s, giving the likelihood L1 (from alpha) or L0 (from alpha*beta) in the
// stochastic domain. Purely combinational.
module likelihood (
  input  logic a_s,
  input  logic z,
  output logic l_s
);

  always_comb l_s = z ? a_s : ~a_s;

endmodule
