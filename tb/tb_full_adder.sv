// tb_full_adder: exhaustive check of the full adder cell, a+b+c = s + 2*co.
module tb_full_adder;
  logic a, b, c, s, co;
  int   checks = 0, failures = 0;

  full_adder dut (.a, .b, .c, .s, .co);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (int'(s) + 2 * int'(co) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("%b%b%b: s=%b co=%b", a, b, c, s, co);
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
