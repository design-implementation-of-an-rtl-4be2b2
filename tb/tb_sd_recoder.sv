// tb_sd_recoder: checks the signed-digit radix-10 recoding.
// For random and corner-case 8-digit B it checks that every recoded digit
// lies in -5..+5, that its magnitude is one-hot (or zero), that the top digit
// is never negative, and that sum(y[i] * 10^i) equals B.
module tb_sd_recoder;
  localparam int M = 8;
  logic [4*M-1:0]  b;
  logic [M:0]      sgn;
  logic [M:0][4:0] mag;
  int              checks = 0, failures = 0;

  sd_recoder #(.M(M)) dut (.b, .sgn, .mag);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint x, v, w;
      bit     ok;
      case (t % 4)
        0: x = longint'($urandom_range(0, 1)) ? 99999999 : 59595959;
        1: x = longint'($urandom_range(0, 9)) * 11111111;
        default: x = longint'($urandom_range(0, 99999999));
      endcase
      for (int i = 0; i < M; i++) b[4*i +: 4] = 4'((x / (10 ** i)) % 10);
      #1;
      v = 0; w = 1; ok = 1;
      for (int i = 0; i <= M; i++) begin
        int mg;
        mg = 0;
        for (int k = 1; k <= 5; k++) if (mag[i][k-1]) mg = k;
        if (!$onehot0(mag[i])) ok = 0;
        v += (sgn[i] ? -mg : mg) * w;
        w *= 10;
      end
      if (sgn[M]) ok = 0;
      checks++;
      if (!ok || v != x) begin
        failures++;
        if (failures < 5) $display("B=%0d: recoded value %0d ok=%0d", x, v, ok);
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
