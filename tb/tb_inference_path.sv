// tb_inference_path: one path for grid (5,9) with the UGV at (7,3), which puts
// the grid in sector 3 (bearing about 108 degrees). Each time step runs en for
// 2048 clocks and then gives one load clock. Checks: the prior register only
// changes on load and then takes exactly the counter value; repeated steps with
// photodiode 3 firing drive the prior up towards 255; steps with only other
// photodiodes firing (so z_j = 0) drive it down, as Bayes' rule predicts for
// alpha = 0.8, beta = 0.4.
module tb_inference_path;
  import bslm_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, load = 0;
  pos_t x_ugv;
  logic [7:0] z;
  prob_t alpha, alpha_beta, prior, post;
  int checks = 0, failures = 0;

  inference_path #(.GX(8'd5), .GY(8'd9), .PATH_ID(3), .P_INIT(8'd128)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .load(load), .x_ugv(x_ugv), .z(z),
    .alpha(alpha), .alpha_beta(alpha_beta), .prior(prior), .post(post)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic [7:0] zz, output prob_t p_before, output prob_t p_after);
    prob_t p0, snap;
    z = zz;
    p0 = prior;
    p_before = p0;
    en = 1;
    for (int c = 0; c < 2048; c++) begin
      @(negedge clk);
      if (prior != p0) begin check(0, "prior changed while running"); break; end
    end
    en = 0;
    snap = post;
    load = 1;
    @(negedge clk);
    load = 0;
    check(prior == snap, $sformatf("prior %0d after load, counter was %0d", prior, snap));
    p_after = prior;
  endtask

  initial begin
    prob_t b, a, start_p;
    alpha = 8'd204; alpha_beta = 8'd82;
    x_ugv = '{x: 8'd7, y: 8'd3};
    z = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(prior == 8'd128 && post == 8'd128, "reset values");
    check(dut.z_j == 1'b0, "z_j with no photodiode firing");
    z = 8'b0000_0100;
    #1 check(dut.z_j == 1'b1, "z_j should follow photodiode 3");
    // source seen: expected posteriors from 0.5 are 0.71, 0.86, 0.94 ...
    start_p = prior;
    for (int s = 0; s < 4; s++) begin
      step(8'b0000_0100, b, a);
      $display("z_j=1 step %0d: prior %0d -> %0d", s, b, a);
    end
    check(a > 8'd215, $sformatf("prior after 4 detections %0d", a));
    // other sectors fire: expected 0.94 -> 0.80 -> 0.51 -> ...
    start_p = prior;
    for (int s = 0; s < 6; s++) begin
      step(8'b1000_0010, b, a);
      $display("z_j=0 step %0d: prior %0d -> %0d", s, b, a);
    end
    check(a < start_p && a < 8'd90, $sformatf("prior after 6 misses %0d (from %0d)", a, start_p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
