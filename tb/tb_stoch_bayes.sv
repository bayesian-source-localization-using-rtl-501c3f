// tb_stoch_bayes: runs the stochastic Bayesian module with alpha = 0.8 and
// beta = 0.4 (the values of the published evaluation) on several held priors with z_j = 1 and
// z_j = 0, and compares the mean of the counter after settling with Bayes' rule
// worked out in real arithmetic here (value v meaning (v + 1) / 256). With en low the output must not move.
module tb_stoch_bayes;
  import bslm_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, z = 0;
  prob_t alpha, alpha_beta, prior, post;
  int checks = 0, failures = 0;

  stoch_bayes #(.PATH_ID(7), .P_INIT(8'd128)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .alpha(alpha), .alpha_beta(alpha_beta),
    .prior(prior), .z(z), .post(post)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, ab, p, l1, l0, target, acc, mean;
    prob_t held;
    int priors [5] = '{128, 30, 220, 200, 60};
    alpha = 8'd204;       // (204 + 1) / 256 = 0.80
    alpha_beta = 8'd82;   // (82 + 1) / 256 = 0.32
    prior = 8'd128;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // no movement while en is low
    held = post;
    repeat (50) @(negedge clk);
    check(post == held, "post moved with en low");
    en = 1;
    for (int t = 0; t < 10; t++) begin
      prior = 8'(priors[t % 5]);
      z = (t >= 5);
      a = (alpha + 1) / 256.0; ab = (alpha_beta + 1) / 256.0; p = (prior + 1) / 256.0;
      l1 = z ? a : 1.0 - a;
      l0 = z ? ab : 1.0 - ab;
      target = 256.0 * l1 * p / (l1 * p + l0 * (1.0 - p)) - 1.0;
      repeat (3000) @(negedge clk);
      acc = 0;
      for (int c = 0; c < 8000; c++) begin
        @(negedge clk);
        acc += post;
      end
      mean = acc / 8000.0;
      $display("prior %0d z %0d: mean posterior %f, Bayes gives %f", prior, z, mean, target);
      check(mean > target - 8.0 && mean < target + 8.0,
            $sformatf("prior %0d z %0d: mean %f target %f", prior, z, mean, target));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
