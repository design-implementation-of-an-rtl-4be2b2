// tb_bin_csa43: exhaustive check of the binary 4:3 counter,
// b0+b1+b2+b3 = z + 2*(c1 + c2).
module tb_bin_csa43;
  logic [3:0] b;
  logic       z, c1, c2;
  int         checks = 0, failures = 0;

  bin_csa43 dut (.b, .z, .c1, .c2);

  initial begin
    for (int v = 0; v < 16; v++) begin
      b = 4'(v);
      #1;
      checks++;
      if (int'(z) + 2 * (int'(c1) + int'(c2)) != $countones(b)) begin
        failures++;
        $display("%b: z=%b c1=%b c2=%b", b, z, c1, c2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
