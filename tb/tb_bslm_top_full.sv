// tb_bslm_top_full: the localisation array with every parameter at its
// default (40 x 40 arena, N_SC = 2048) through the localisation experiment of
// the design's evaluation: light source at (8,33), vehicle starting at (34,10).
// The vehicle reads its photodiodes from the noise model with
// alpha = 0.8 and beta = 0.4, and after every time step moves one cell
// towards the estimate. Every step it checks the step latency, that x_s and
// p_max name the cell with the largest posterior (lowest cell index on a tie)
// and that each posterior register took its counter's value. It counts the
// mechanisms of the design (updates with z_j = 1 and z_j = 0, the vehicle's
// own cell, ties in the max tree, posteriors at 0 and at the counter top 254,
// vehicle moves) and fails if any never happened. The run ends at the first
// step whose estimate is within 1.5 cells of the source (the localisation
// criterion of the evaluation) and fails if that takes more than T steps.
module tb_bslm_top_full;
  import bslm_pkg::*;
  import bslm_tb_pkg::*;
  localparam int K = 40, NSC = 2048, T = 100;  // the top's defaults
  localparam int NG = K * K;
  localparam int LAT = NSC + $clog2(NG) + 2;  // run, load, tree levels, output register
  localparam int SX = 8, SY = 33;
  localparam real ALPHA = 0.8, BETA = 0.4;

  logic clk = 0, rst_n = 0, start = 0;
  pos_t x_ugv, x_s;
  logic [7:0] z;
  prob_t alpha, alpha_beta, p_max;
  logic busy, done;
  int checks = 0, failures = 0;
  int cyc = 0;
  prob_t pri [NG];
  prob_t cnt [NG];

  bslm_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x_ugv(x_ugv), .z(z),
    .alpha(alpha), .alpha_beta(alpha_beta), .busy(busy), .done(done),
    .x_s(x_s), .p_max(p_max)
  );

  for (genvar k = 0; k < K; k++) begin : g_x
    for (genvar l = 0; l < K; l++) begin : g_y
      assign pri[k*K+l] = dut.g_x[k].g_y[l].u_path.prior;
      assign cnt[k*K+l] = dut.g_x[k].g_y[l].u_path.post;
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (T * (LAT + 10) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ux, uy, c0, best, bi, n_best, t_loc, lat;
    int n_z1, n_z0, n_own, n_tie, n_p0, n_p255, n_move;
    logic [7:0] zz;
    n_z1 = 0; n_z0 = 0; n_own = 0; n_tie = 0; n_p0 = 0; n_p255 = 0; n_move = 0;
    t_loc = -1;
    alpha = 8'd204;       // (204 + 1) / 256 = 0.80
    alpha_beta = 8'd82;   // (82 + 1) / 256 = 0.32 = alpha * beta
    ux = 34; uy = 10;
    x_ugv = '0; z = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int i = 0; i < NG; i++) check(pri[i] == 8'd128, "prior after reset");
    for (int t = 1; t <= T && t_loc < 0; t++) begin
      zz = photodiodes(ux, uy, SX, SY, ALPHA, BETA);
      // count what the paths will see this step
      for (int k = 1; k <= K; k++)
        for (int l = 1; l <= K; l++) begin
          if (zz[ref_sector(ux, uy, k, l) - 1]) n_z1++; else n_z0++;
          if (k == ux && l == uy) n_own++;
        end
      check(!busy, "busy before start");
      x_ugv = '{x: 8'(ux), y: 8'(uy)}; z = zz; start = 1;
      @(posedge clk);
      c0 = cyc;
      @(negedge clk);
      start = 0; z = 8'($urandom); x_ugv = '{x: 8'($urandom), y: 8'($urandom)};  // must not matter
      while (!done) @(negedge clk);
      lat = cyc - c0;
      check(lat == LAT, $sformatf("step %0d latency %0d, expected %0d", t, lat, LAT));
      // the registers took the counters' values and the tree found their max
      best = -1; bi = 0; n_best = 0;
      for (int i = 0; i < NG; i++) begin
        if (int'(pri[i]) > best) begin best = pri[i]; bi = i; end
        if (pri[i] == 8'd0) n_p0++;
        if (pri[i] == 8'd254) n_p255++;  // counter top
      end
      for (int i = 0; i < NG; i++) if (int'(pri[i]) == best) n_best++;
      for (int i = 0; i < NG; i++)
        if (pri[i] != cnt[i]) begin check(0, $sformatf("cell %0d register %0d counter %0d", i, pri[i], cnt[i])); break; end
      checks++;
      if (n_best > 1) n_tie++;
      check(int'(p_max) == best, $sformatf("step %0d p_max %0d, largest posterior %0d", t, p_max, best));
      check(int'(x_s.x) == bi / K + 1 && int'(x_s.y) == bi % K + 1,
            $sformatf("step %0d x_s (%0d,%0d), expected (%0d,%0d)", t, x_s.x, x_s.y, bi / K + 1, bi % K + 1));
      $display("t=%0d ugv=(%0d,%0d) z=%b x_s=(%0d,%0d) p_max=%0d dist=%f", t, ux, uy, zz,
               x_s.x, x_s.y, p_max, cell_dist(x_s.x, x_s.y, SX, SY));
      if (t_loc < 0 && cell_dist(x_s.x, x_s.y, SX, SY) < 1.5) t_loc = t;
      // the vehicle steps towards the estimate
      if (sgn(int'(x_s.x) - ux) != 0 || sgn(int'(x_s.y) - uy) != 0) n_move++;
      ux += sgn(int'(x_s.x) - ux);
      uy += sgn(int'(x_s.y) - uy);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    check(t_loc > 0, "source not localised within the step limit");
    $display("localised after T=%0d time steps", t_loc);
    $display("mechanisms: z_j=1 %0d, z_j=0 %0d, own cell %0d, max ties %0d, posterior 0: %0d, 254: %0d, moves %0d",
             n_z1, n_z0, n_own, n_tie, n_p0, n_p255, n_move);
    check(n_z1 > 0, "no update with z_j = 1");
    check(n_z0 > 0, "no update with z_j = 0");
    check(n_own > 0, "vehicle never on a cell it estimates");
    check(n_tie > 0, "max tree never saw a tie");
    check(n_p0 > 0, "no posterior reached 0");
    check(n_p255 > 0, "no posterior reached the counter top 254");
    check(n_move > 0, "vehicle never moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
