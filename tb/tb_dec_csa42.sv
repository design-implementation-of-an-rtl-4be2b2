// tb_dec_csa42: checks the decimal 4:2 compressor on 6-digit BCD-4221
// operands: A + B + C + D = S + 2H modulo 10^6.
module tb_dec_csa42;
  localparam int W = 6;
  localparam longint MOD = 1000000;
  logic [3:0][4*W-1:0] ops;
  logic [4*W-1:0]      s, h2;
  int                  checks = 0, failures = 0;

  dec_csa42 #(.W(W)) dut (.ops, .s, .h2);

  function automatic longint dec4221(input logic [4*W-1:0] v);
    longint r = 0;
    for (int i = W - 1; i >= 0; i--)
      r = r * 10 + 4 * v[4*i+3] + 2 * v[4*i+2] + 2 * v[4*i+1] + v[4*i];
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      longint tot;
      for (int j = 0; j < 4; j++) ops[j] = (t % 4 == 0) ? '1 : 24'($urandom);
      #1;
      tot = 0;
      for (int j = 0; j < 4; j++) tot += dec4221(ops[j]);
      checks++;
      if ((dec4221(s) + dec4221(h2)) % MOD != tot % MOD) begin
        failures++;
        if (failures < 5) $display("ops=%h: s=%h h2=%h", ops, s, h2);
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
