// tb_normalization: checks the normalization counter clock by clock against
// the update rule (+1 when only E1 is set, -1 for one inhibition without E1
// or two with E1, -2 for two without E1, saturating at 0 and 254, frozen when
// en is low), using the module's internal P_o stream, and drives it to both
// ends of its range. Then feeds it Bernoulli
// streams P1 and P2 and checks that the mean counter value settles at
// 256 * P1 / (P1 + P2) - 1 (the SNG reads value v as (v + 1) / 256).
module tb_normalization;
  logic clk = 0, rst_n = 0, en = 0, p1 = 0, p2 = 0;
  logic [7:0] po;
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0;

  normalization #(.P_INIT(8'd128), .MASK(16'hED65), .SEED(16'h2121)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .p1(p1), .p2(p2), .po(po)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // draw a bit that is 1 with probability num/1000
  function automatic logic bern(int num);
    return ($urandom_range(0, 999) < num);
  endfunction

  initial begin
    int exp_po, delta;
    logic e1, i1, i2;
    real acc, mean, target;
    int pa [4] = '{500, 100, 300, 800};
    int pb [4] = '{500, 400, 50, 200};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(po == 8'd128, "reset value");
    // 1) clock-exact update rule with random inputs, drifting to both ends
    for (int c = 0; c < 20000; c++) begin
      int bias;
      bias = (c / 2000) % 2;           // alternate pushing up and down
      en = ($urandom_range(0, 9) != 0);
      p1 = bias ? bern(1000) : bern(0);
      p2 = bias ? bern(0)    : bern(900);
      #1;
      e1 = p1; i1 = p1 & dut.po_s; i2 = p2 & dut.po_s;
      delta = int'(e1) - int'(i1) - int'(i2);
      exp_po = int'(po);
      if (en) exp_po = exp_po + delta;
      if (exp_po > 254) begin exp_po = 254; n_sat_hi++; end
      if (exp_po < 0)   begin exp_po = 0;   n_sat_lo++; end
      @(negedge clk);
      check(int'(po) == exp_po, $sformatf("cycle %0d po=%0d exp %0d", c, po, exp_po));
    end
    check(n_sat_hi > 0, "upper limit 254 never pressed");
    check(n_sat_lo > 0, "lower saturation never reached");
    // 2) equilibrium P1/(P1+P2)
    en = 1;
    for (int t = 0; t < 4; t++) begin
      acc = 0;
      for (int c = 0; c < 12000; c++) begin
        p1 = bern(pa[t]); p2 = bern(pb[t]);
        @(negedge clk);
        if (c >= 4000) acc += po;
      end
      mean = acc / 8000.0;
      target = 256.0 * pa[t] / (pa[t] + pb[t]) - 1.0;
      check(mean > target - 12.0 && mean < target + 12.0,
            $sformatf("equilibrium %0d: mean %f target %f", t, mean, target));
      $display("equilibrium P1=%0d P2=%0d (/1000): mean %f target %f", pa[t], pb[t], mean, target);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
