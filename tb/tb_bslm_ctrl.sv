// tb_bslm_ctrl: checks the step sequencer with N_SC = 20: inputs are sampled
// on start only, en is high for exactly N_SC clocks, load follows for one
// clock, busy stays high until the (modelled) max tree answers, and a start
// while busy is ignored.
module tb_bslm_ctrl;
  import bslm_pkg::*;
  localparam int NSC = 20;
  logic clk = 0, rst_n = 0, start = 0, tree_valid = 0;
  pos_t x_ugv_i, x_ugv_q;
  logic [7:0] z_i, z_q;
  logic en, load, busy;
  int checks = 0, failures = 0;

  bslm_ctrl #(.N_SC(NSC)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x_ugv_i(x_ugv_i), .z_i(z_i),
    .tree_valid(tree_valid), .x_ugv_q(x_ugv_q), .z_q(z_q), .en(en), .load(load), .busy(busy)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_en, delay;
    pos_t px; logic [7:0] pz;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(!busy && !en && !load, "idle after reset");
    for (int s = 0; s < 5; s++) begin
      px = '{x: 8'($urandom), y: 8'($urandom)}; pz = 8'($urandom);
      x_ugv_i = px; z_i = pz; start = 1;
      @(negedge clk);
      start = 0;
      x_ugv_i = '{x: 8'($urandom), y: 8'($urandom)}; z_i = 8'($urandom);
      check(busy, "busy after start");
      n_en = 0;
      while (en) begin
        n_en++;
        check(x_ugv_q == px && z_q == pz, "inputs not held");
        if (n_en == 5) start = 1;  // must be ignored
        @(negedge clk);
        start = 0;
      end
      check(n_en == NSC, $sformatf("en high for %0d clocks", n_en));
      check(load, "load after run");
      @(negedge clk);
      check(!load && busy, "load is one clock");
      delay = $urandom_range(1, 12);
      repeat (delay - 1) begin
        @(negedge clk);
        check(busy && !en && !load, "waiting for tree");
      end
      tree_valid = 1;
      @(negedge clk);
      tree_valid = 0;
      check(!busy && !en, "idle after tree answered");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
