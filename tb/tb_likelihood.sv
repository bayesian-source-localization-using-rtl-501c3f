// tb_likelihood: exhaustive check of the likelihood multiplexer: z = 1 passes
// the stream, z = 0 passes its complement.
module tb_likelihood;
  logic a_s, z, l_s;
  int checks = 0, failures = 0;

  likelihood dut (.a_s(a_s), .z(z), .l_s(l_s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_l;
    for (int i = 0; i < 4; i++) begin
      {z, a_s} = 2'(i);
      #1;
      exp_l = (z == 1'b1) ? a_s : !a_s;
      checks++;
      if (l_s !== exp_l) begin
        failures++;
        $display("FAIL: z=%b a_s=%b l_s=%b", z, a_s, l_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
