// tb_bin_csa73: exhaustive check of the binary 7:3 counter,
// popcount(b) = z + 2*c2 + 4*c4.
module tb_bin_csa73;
  logic [6:0] b;
  logic       z, c2, c4;
  int         checks = 0, failures = 0;

  bin_csa73 dut (.b, .z, .c2, .c4);

  initial begin
    for (int v = 0; v < 128; v++) begin
      b = 7'(v);
      #1;
      checks++;
      if (int'(z) + 2 * int'(c2) + 4 * int'(c4) != $countones(b)) begin
        failures++;
        $display("%b: z=%b c2=%b c4=%b", b, z, c2, c4);
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
