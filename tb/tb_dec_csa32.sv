// tb_dec_csa32: checks the decimal 3:2 CSA on 6-digit BCD-4221 operands.
// Operands are random 4-bit patterns per digit (every pattern is a valid
// 4221 digit). The check is A + B + C = S + 2H modulo 10^6, with the carry
// out accounting for the part above 10^6, all decoded with the 4221 weights.
module tb_dec_csa32;
  localparam int W = 6;
  logic [4*W-1:0] a, b, c, s, h2;
  logic           cout;
  int             checks = 0, failures = 0;

  dec_csa32 #(.W(W)) dut (.a, .b, .c, .s, .h2, .cout);

  function automatic longint dec4221(input logic [4*W-1:0] v);
    longint r = 0;
    for (int i = W - 1; i >= 0; i--)
      r = r * 10 + 4 * v[4*i+3] + 2 * v[4*i+2] + 2 * v[4*i+1] + v[4*i];
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      a = 24'($urandom); b = 24'($urandom); c = 24'($urandom);
      if (t % 3 == 0) a = '1;
      #1;
      checks++;
      if (dec4221(a) + dec4221(b) + dec4221(c) != dec4221(s) + dec4221(h2) + 1000000 * longint'(cout)) begin
        failures++;
        if (failures < 5) $display("a=%h b=%h c=%h: s=%h h2=%h cout=%b", a, b, c, s, h2, cout);
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
