// tb_csa_reduction_tree: checks partial product alignment and reduction for
// 4 x 8 digits in 2 blocks (one 5:2 and one 4:2 compressor).
// The testbench recodes a random B itself, forms each row as |y|*A in BCD-4221
// (choosing at random among the 4221 patterns of each digit value) and
// inverts negative rows. Each block's pair S + 2H is read as a signed
// 10's-complement number of WB digits; weighted by 10^(b*R) the block values
// must add up to A x B exactly.
module tb_csa_reduction_tree;
  localparam int N = 4, M = 8, NBLK = 2;
  localparam int R = M / NBLK, WB = N + R + 3;
  logic [M:0][4*(N+1)-1:0]   pp;
  logic [M:0]                sgn;
  logic [NBLK-1:0][4*WB-1:0] s, h2;
  int                        checks = 0, failures = 0;

  csa_reduction_tree #(.N(N), .M(M), .NBLK(NBLK)) dut (.pp, .sgn, .s, .h2);

  function automatic longint dec4221(input logic [4*WB-1:0] v);
    longint r = 0;
    for (int i = WB - 1; i >= 0; i--)
      r = r * 10 + 4 * v[4*i+3] + 2 * v[4*i+2] + 2 * v[4*i+1] + v[4*i];
    return r;
  endfunction

  // a random 4221 pattern of value v
  function automatic logic [3:0] enc4221(input int v);
    logic [3:0] x;
    do x = 4'($urandom); while (4 * x[3] + 2 * x[2] + 2 * x[1] + x[0] != v);
    return x;
  endfunction

  initial begin
    longint pow10 [20];
    pow10[0] = 1;
    for (int i = 1; i < 20; i++) pow10[i] = pow10[i-1] * 10;
    for (int t = 0; t < 3000; t++) begin
      longint a, b, bb, tot, modw;
      int     y [M+1];
      int     tr;
      a = (t % 3 == 0) ? 9999 : longint'($urandom_range(0, 9999));
      b = (t % 4 == 0) ? 99999999 : longint'($urandom_range(0, 99999999));
      // signed-digit radix-10 recoding of b
      bb = b; tr = 0;
      for (int i = 0; i < M; i++) begin
        int dg;
        dg = int'(bb % 10); bb = bb / 10;
        y[i] = dg + tr - ((dg >= 5) ? 10 : 0);
        sgn[i] = (dg >= 5);
        tr = (dg >= 5) ? 1 : 0;
      end
      y[M] = tr; sgn[M] = 1'b0;
      for (int k = 0; k <= M; k++) begin
        longint mv;
        mv = longint'(y[k] < 0 ? -y[k] : y[k]) * a;
        for (int i = 0; i <= N; i++) pp[k][4*i +: 4] = enc4221(int'((mv / pow10[i]) % 10));
        if (sgn[k]) pp[k] = ~pp[k];
      end
      #1;
      tot = 0;
      modw = pow10[WB];
      for (int bk = 0; bk < NBLK; bk++) begin
        longint v;
        v = (dec4221(s[bk]) + dec4221(h2[bk])) % modw;
        if (v >= modw / 2) v -= modw;
        tot += v * pow10[bk*R];
      end
      checks++;
      if (tot != a * b) begin
        failures++;
        if (failures < 5) $display("%0d x %0d: blocks add up to %0d", a, b, tot);
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
