// tb_adder_recoding: checks the BCD-4221 adder recoding on 7-digit operands
// (an odd width, so the top digit pair is half empty). For random 4221
// vectors S and 2H it checks that D + c = S + 2H modulo 10^7, that every
// output digit uses the reduced 4221 patterns, and that carries appear only
// at even positions above 0.
module tb_adder_recoding;
  localparam int W = 7;
  localparam longint MOD = 10000000;
  logic [4*W-1:0] s, h2, d;
  logic [W-1:0]   c;
  int             checks = 0, failures = 0;

  adder_recoding #(.W(W)) dut (.s, .h2, .d, .c);

  function automatic longint dec4221(input logic [4*W-1:0] v);
    longint r = 0;
    for (int i = W - 1; i >= 0; i--)
      r = r * 10 + 4 * v[4*i+3] + 2 * v[4*i+2] + 2 * v[4*i+1] + v[4*i];
    return r;
  endfunction

  function automatic longint bits_val(input logic [W-1:0] v);
    longint r = 0;
    for (int i = W - 1; i >= 0; i--) r = r * 10 + longint'(v[i]);
    return r;
  endfunction

  function automatic bit reduced(input logic [3:0] x);
    return x inside {4'b0000, 4'b0001, 4'b0100, 4'b0101, 4'b0110,
                     4'b1001, 4'b1010, 4'b1011, 4'b1110, 4'b1111};
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      s  = 28'($urandom);
      h2 = 28'($urandom);
      if (t % 5 == 0) begin s = '1; h2 = '1; end
      #1;
      checks++;
      if ((dec4221(d) + bits_val(c)) % MOD != (dec4221(s) + dec4221(h2)) % MOD) begin
        failures++;
        if (failures < 5) $display("s=%h h2=%h: d=%h c=%b", s, h2, d, c);
      end
      checks++;
      for (int i = 0; i < W; i++) begin
        if (!reduced(d[4*i +: 4]) || (c[i] && (i % 2 == 1 || i == 0))) begin
          failures++;
          $display("digit %0d: d=%b c=%b", i, d[4*i +: 4], c[i]);
          break;
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
