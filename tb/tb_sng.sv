// tb_sng: over any 65535 consecutive clocks the SNG must emit exactly
// 256 * x + 255 ones: its 16-bit LFSR visits every non-zero state once, so the
// top byte r is 0 in 255 states and any other value in 256, and it outputs
// r <= x. Checks the end points 0 and 255 and random values at random phases.
module tb_sng;
  logic clk = 0, rst_n = 0;
  logic [7:0] x;
  logic b;
  int checks = 0, failures = 0;

  sng #(.MASK(16'h9E49), .SEED(16'h5A5A)) dut (.clk(clk), .rst_n(rst_n), .x(x), .bit_o(b));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    logic [7:0] vals [];
    vals = new[12];
    vals[0] = 0; vals[1] = 255; vals[2] = 1; vals[3] = 128;
    for (int i = 4; i < 12; i++) vals[i] = 8'($urandom);
    x = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    foreach (vals[v]) begin
      @(negedge clk);
      x = vals[v];
      #1;
      repeat ($urandom_range(0, 7)) @(negedge clk);
      ones = 0;
      for (int c = 0; c < 65535; c++) begin
        ones += int'(b);
        @(negedge clk);
      end
      checks++;
      if (ones != 256 * int'(vals[v]) + 255) begin
        failures++;
        $display("FAIL: x=%0d gave %0d ones in 65535 clocks", vals[v], ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
