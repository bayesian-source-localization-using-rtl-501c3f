// tb_lfsr: checks that the 16-bit LFSR with mask 16'hB147 starts from its
// seed, follows the Galois sequence worked out by hand for its first steps,
// visits all 65535 non-zero values once and repeats after exactly 65535 clocks.
module tb_lfsr;
  logic clk = 0, rst_n = 0;
  logic [15:0] r;
  int checks = 0, failures = 0;
  bit seen [65536];
  // shift right, XOR the mask when a 1 falls out (worked out by hand)
  logic [15:0] first [6] = '{16'h0001, 16'hB147, 16'hE9E4, 16'h74F2, 16'h3A79, 16'hAC7B};

  lfsr #(.WIDTH(16), .MASK(16'hB147), .SEED(16'h0001)) dut (.clk(clk), .rst_n(rst_n), .r(r));

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

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int i = 0; i < 65535; i++) begin
      if (i < 6) check(r == first[i], $sformatf("step %0d r=%h exp %h", i, r, first[i]));
      check(r != 0, "zero state");
      if (seen[r]) check(0, $sformatf("value %h repeated at step %0d", r, i));
      seen[r] = 1;
      @(negedge clk);
    end
    check(r == 16'h0001, "period is not 65535");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
