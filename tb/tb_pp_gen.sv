// tb_pp_gen: checks one partial product row.
// Random 4221 multiples (each 4221 digit drawn as a random 4-bit pattern) are
// applied with every magnitude 0..5 and both signs; the row must equal the
// selected multiple, bit-inverted when the sign is set (the 9's complement),
// and all zeros / all ones for magnitude zero.
module tb_pp_gen;
  localparam int N = 6;
  localparam int PW = 4 * (N + 1);
  logic [PW-1:0] m [5];
  logic [PW-1:0] pp, expv;
  logic          sgn;
  logic [4:0]    mag;
  int            checks = 0, failures = 0;

  pp_gen #(.N(N)) dut (.m1(m[0]), .m2(m[1]), .m3(m[2]), .m4(m[3]), .m5(m[4]), .sgn, .mag, .pp);

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < 5; k++) m[k] = {$urandom, $urandom};
      for (int g = 0; g <= 5; g++) begin
        for (int s = 0; s < 2; s++) begin
          mag = (g == 0) ? 5'd0 : 5'(1 << (g - 1));
          sgn = 1'(s);
          #1;
          expv = (g == 0) ? '0 : m[g-1];
          if (s == 1) expv = ~expv;
          checks++;
          if (pp != expv) begin
            failures++;
            if (failures < 5) $display("mag=%0d sgn=%0d: got %h expected %h", g, s, pp, expv);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
