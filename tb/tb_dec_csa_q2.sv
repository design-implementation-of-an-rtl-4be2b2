// tb_dec_csa_q2: checks decimal Q:2 compressors for Q = 2..12 on 6-digit
// BCD-4221 operands: sum of all operands = S + 2H modulo 10^6.
module tb_dec_csa_q2;
  localparam int W = 6;
  localparam longint MOD = 1000000;
  int checks = 0, failures = 0;

  function automatic longint dec4221(input logic [4*W-1:0] v);
    longint r = 0;
    for (int i = W - 1; i >= 0; i--)
      r = r * 10 + 4 * v[4*i+3] + 2 * v[4*i+2] + 2 * v[4*i+1] + v[4*i];
    return r;
  endfunction

  logic [11:0][4*W-1:0] ops;
  logic [4*W-1:0]       s [2:12];
  logic [4*W-1:0]       h2 [2:12];

  for (genvar q = 2; q <= 12; q++) begin : g_q
    dec_csa_q2 #(.Q(q), .W(W)) dut (.ops(ops[q-1:0]), .s(s[q]), .h2(h2[q]));
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int j = 0; j < 12; j++) ops[j] = (t % 4 == 0) ? '1 : 24'($urandom);
      #1;
      for (int q = 2; q <= 12; q++) begin
        longint tot;
        tot = 0;
        for (int j = 0; j < q; j++) tot += dec4221(ops[j]);
        checks++;
        if ((dec4221(s[q]) + dec4221(h2[q])) % MOD != tot % MOD) begin
          failures++;
          if (failures < 5) $display("Q=%0d: got %0d expected %0d", q,
                                     (dec4221(s[q]) + dec4221(h2[q])) % MOD, tot % MOD);
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
