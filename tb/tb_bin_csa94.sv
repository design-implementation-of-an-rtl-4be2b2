// tb_bin_csa94: exhaustive check of the binary 9:4 counter,
// popcount(b) = z + 2*(c2a + c2b) + 4*c4.
module tb_bin_csa94;
  logic [8:0] b;
  logic       z, c2a, c2b, c4;
  int         checks = 0, failures = 0;

  bin_csa94 dut (.b, .z, .c2a, .c2b, .c4);

  initial begin
    for (int v = 0; v < 512; v++) begin
      b = 9'(v);
      #1;
      checks++;
      if (int'(z) + 2 * (int'(c2a) + int'(c2b)) + 4 * int'(c4) != $countones(b)) begin
        failures++;
        $display("%b: z=%b c2a=%b c2b=%b c4=%b", b, z, c2a, c2b, c4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
