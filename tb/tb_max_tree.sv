// tb_max_tree: streams random vectors (many with ties, some all-zero) into a
// 37-input max tree, one per clock, and checks each answer against a linear
// search done here: largest value, lowest index on a tie, tag of that index,
// arriving exactly ceil(log2 37) = 6 clocks after valid_i. Also runs the
// 1600-input size of the 40 x 40 arena for a few vectors (11 clocks).
module tb_max_tree;
  import bslm_pkg::*;
  localparam int N = 37, LAT = 6;
  localparam int NB = 1600, LATB = 11;
  logic clk = 0, rst_n = 0, valid_i = 0, valid_o;
  prob_t vals [N];
  logic [15:0] tags [N];
  prob_t max_val;
  logic [15:0] max_tag;
  logic valid_i_b = 0, valid_o_b;
  prob_t vals_b [NB];
  logic [15:0] tags_b [NB];
  prob_t max_val_b;
  logic [15:0] max_tag_b;
  int checks = 0, failures = 0;
  int exp_v [$], exp_t [$], issue_cyc [$];
  int cyc = 0, n_ties = 0;

  max_tree #(.N(N), .TW(16)) dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .vals(vals), .tags(tags),
    .valid_o(valid_o), .max_val(max_val), .max_tag(max_tag)
  );
  max_tree #(.N(NB), .TW(16)) dut_big (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i_b), .vals(vals_b), .tags(tags_b),
    .valid_o(valid_o_b), .max_val(max_val_b), .max_tag(max_tag_b)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare outputs of the small tree
  always @(negedge clk) if (rst_n) begin
    if (valid_o) begin
      if (exp_v.size() == 0) check(0, "unexpected valid_o");
      else begin
        int ev, et, ic;
        ev = exp_v.pop_front(); et = exp_t.pop_front(); ic = issue_cyc.pop_front();
        check(int'(max_val) == ev && int'(max_tag) == et,
              $sformatf("got %0d/%h exp %0d/%h", max_val, max_tag, ev, et));
        check(cyc - ic == LAT, $sformatf("latency %0d", cyc - ic));
      end
    end
  end

  initial begin
    int best, bi, cnt_max, range_hi;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < N; i++) tags[i] = 16'($urandom);
    for (int v = 0; v < 300; v++) begin
      @(negedge clk);
      range_hi = (v % 3 == 0) ? 3 : 255;
      for (int i = 0; i < N; i++) vals[i] = (v % 50 == 7) ? 8'd0 : 8'($urandom_range(0, range_hi));
      best = -1; bi = 0; cnt_max = 0;
      for (int i = 0; i < N; i++)
        if (int'(vals[i]) > best) begin best = vals[i]; bi = i; end
      for (int i = 0; i < N; i++) if (int'(vals[i]) == best) cnt_max++;
      if (cnt_max > 1) n_ties++;
      exp_v.push_back(best); exp_t.push_back(tags[bi]); issue_cyc.push_back(cyc);
      valid_i = 1;
    end
    @(negedge clk);
    valid_i = 0;
    repeat (LAT + 3) @(negedge clk);
    check(exp_v.size() == 0, "answers missing");
    check(n_ties > 0, "no ties exercised");
    // large tree, one vector at a time
    for (int i = 0; i < NB; i++) tags_b[i] = 16'(i);
    for (int v = 0; v < 5; v++) begin
      int start_c;
      for (int i = 0; i < NB; i++) vals_b[i] = 8'($urandom_range(0, 200));
      bi = $urandom_range(0, NB - 1);
      vals_b[bi] = 8'(201 + v);
      valid_i_b = 1;
      start_c = cyc;
      @(negedge clk);
      valid_i_b = 0;
      while (!valid_o_b && cyc - start_c < 50) @(negedge clk);
      check(valid_o_b && cyc - start_c == LATB, $sformatf("big latency %0d", cyc - start_c));
      check(int'(max_val_b) == 201 + v && int'(max_tag_b) == bi,
            $sformatf("big got %0d/%0d exp %0d/%0d", max_val_b, max_tag_b, 201 + v, bi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
