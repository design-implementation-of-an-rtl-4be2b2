// sd_recoder: signed-digit radix-10 recoding of the multiplier B.
//
// Each BCD digit b[i] (0..9) of the M-digit multiplier becomes a digit
// y[i] = b[i] - 10*ys[i] + ys[i-1] in {-5..+5}, where the transfer
// ys[i] = (b[i] >= 5) also serves as the sign of y[i]. A digit with ys set
// is 0 or negative; "-0" (b = 9 with an incoming transfer) is kept as a
// negative zero, which the partial product generator turns into 9's
// complement of zero plus one, i.e. zero. The extra top digit y[M] = ys[M-1]
// is 0 or +1 and never negative, so M digits give M+1 recoded digits.
// Interface: b is M packed BCD digits (digit 0 in bits 3:0); for each of the
// M+1 recoded digits, sgn[i] is the sign and mag[i] a one-hot 5-bit
// magnitude (bit k-1 set for magnitude k, all zero for 0). Combinational.
// The digit set, the sign bit and the 5-bit magnitude follow the document;
// the one-hot form of the magnitude and the negative zero are this design's
// choice.
module sd_recoder #(
  parameter int M = 16
) (
  input  logic [4*M-1:0]  b,
  output logic [M:0]      sgn,
  output logic [M:0][4:0] mag
);
  logic [M:0] ys; // ys[i+1] is the transfer out of digit i; ys[0] = 0

  always_comb begin
    ys[0] = 1'b0;
    for (int i = 0; i < M; i++) begin
      logic [3:0] d;
      logic [3:0] m;
      d       = b[4*i +: 4];
      ys[i+1] = (d >= 4'd5);
      // |y| = b + ys_in        when b < 5
      //     = 10 - b - ys_in   when b >= 5
      m       = ys[i+1] ? 4'(4'd10 - d - 4'(ys[i])) : 4'(d + 4'(ys[i]));
      sgn[i]  = ys[i+1];
      for (int k = 1; k <= 5; k++) mag[i][k-1] = (m == 4'(k));
    end
    sgn[M] = 1'b0;
    mag[M] = {4'b0000, ys[M]};
  end
endmodule
