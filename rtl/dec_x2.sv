// dec_x2: the "2X" block, doubling a BCD-4221 vector.
//
// Each 4221 digit is recoded to BCD-5211 and the whole vector is shifted left
// one bit. A 5211 digit (w5,w2,w1,w1) shifted left reads as a 4221 digit
// (w2,w1,w1,0) of value 2*(d - 5*w5), and the dropped w5 bit, worth 10, enters
// bit 0 of the next digit up. The result is W digits of 4221 plus cout, the
// w5 bit of the top digit (worth 10^W).
// Interface: x and y are W packed BCD-4221 digits. Combinational.
// The recode-and-shift follows the document; the 5211 patterns are this
// design's choice (see bcd_pkg).
module dec_x2
  import bcd_pkg::*;
#(
  parameter int W = 16
) (
  input  logic [4*W-1:0] x,
  output logic [4*W-1:0] y,
  output logic           cout
);
  logic [4*W-1:0] x5211;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      x5211[4*i +: 4] = to_5211(val_4221(x[4*i +: 4]));
    end
  end

  assign y    = {x5211[4*W-2:0], 1'b0};
  assign cout = x5211[4*W-1];
endmodule
