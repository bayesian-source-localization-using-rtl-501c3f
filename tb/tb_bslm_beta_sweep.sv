// tb_bslm_beta_sweep: the localisation experiment of the evaluation, repeated
// for beta = 0.2, 0.4, 0.6 and 0.8 with alpha = 0.8 on the default 40 x 40
// array. For each beta the array is reset, the vehicle starts at (34,10) with
// the source at (8,33), and time steps run until the estimate comes within
// 1.5 cells of the source. It prints the number of steps T for each beta (one
// run each, where the evaluation averages 100). It fails if a run with
// beta <= 0.6 needs more than 150 steps, or if any step's estimate is not the
// largest posterior; the beta = 0.8 run is reported only.
module tb_bslm_beta_sweep;
  import bslm_pkg::*;
  import bslm_tb_pkg::*;
  localparam int K = 40, NG = K * K, T_MAX = 150;
  localparam int SX = 8, SY = 33;
  localparam real ALPHA = 0.8;

  logic clk = 0, rst_n = 0, start = 0;
  pos_t x_ugv, x_s;
  logic [7:0] z;
  prob_t alpha, alpha_beta, p_max;
  logic busy, done;
  int checks = 0, failures = 0;
  prob_t pri [NG];

  bslm_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x_ugv(x_ugv), .z(z),
    .alpha(alpha), .alpha_beta(alpha_beta), .busy(busy), .done(done),
    .x_s(x_s), .p_max(p_max)
  );

  for (genvar k = 0; k < K; k++) begin : g_x
    for (genvar l = 0; l < K; l++) begin : g_y
      assign pri[k*K+l] = dut.g_x[k].g_y[l].u_path.prior;
    end
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (4 * T_MAX * 2100 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real betas [4] = '{0.2, 0.4, 0.6, 0.8};
    int steps [4];
    int ux, uy, best;
    for (int b = 0; b < 4; b++) begin
      alpha = 8'd204;                                        // 0.80
      alpha_beta = 8'(int'(ALPHA * betas[b] * 256.0) - 1);  // (v + 1) / 256 = alpha * beta
      rst_n = 0; start = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      ux = 34; uy = 10;
      steps[b] = -1;
      for (int t = 1; t <= T_MAX && steps[b] < 0; t++) begin
        x_ugv = '{x: 8'(ux), y: 8'(uy)};
        z = photodiodes(ux, uy, SX, SY, ALPHA, betas[b]);
        start = 1;
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
        best = 0;
        for (int i = 0; i < NG; i++) if (int'(pri[i]) > best) best = pri[i];
        check(int'(p_max) == best, $sformatf("beta %f step %0d: p_max %0d, max %0d", betas[b], t, p_max, best));
        if (cell_dist(x_s.x, x_s.y, SX, SY) < 1.5) steps[b] = t;
        ux += sgn(int'(x_s.x) - ux);
        uy += sgn(int'(x_s.y) - uy);
      end
      // with beta = 0.8 a detection is only 1.25 times likelier with the source
      // than without; single runs then vary from about 40 steps to well over
      // T_MAX, so that run is reported, not judged
      if (betas[b] < 0.7)
        check(steps[b] > 0, $sformatf("beta %f: not localised in %0d steps", betas[b], T_MAX));
      if (steps[b] > 0) $display("beta = %.1f: localised after T = %0d time steps", betas[b], steps[b]);
      else $display("beta = %.1f: not localised within %0d time steps", betas[b], T_MAX);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
