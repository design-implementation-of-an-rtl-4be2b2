// pg_adder: W-digit BCD-8421 carry-chain adder ("P-G adder decimal").
//
// For every digit position the adder forms a generate bit (the two digits sum
// to 10 or more) and a propagate bit (they sum to exactly 9). The decimal
// carries then follow the chain c[i+1] = g[i] | (p[i] & c[i]), which maps onto
// an FPGA carry chain, and each sum digit is (a + b + c[i]) mod 10. Operands
// may be 10's-complement numbers: the adder works modulo 10^W and cout is the
// carry out of the top digit.
// Interface: a, b are W packed BCD digits (digit 0 in bits 3:0), cin the
// carry in. Purely combinational.
// The propagate/generate carry chain follows the document; how the sum digit
// is corrected is this design's own choice.
module pg_adder #(
  parameter int W = 16
) (
  input  logic [4*W-1:0] a,
  input  logic [4*W-1:0] b,
  input  logic           cin,
  output logic [4*W-1:0] sum,
  output logic           cout
);
  logic [W:0]   c;
  logic [W-1:0] g, p;
  logic [4:0]   t [W];

  always_comb begin
    logic cy;
    cy = cin;
    for (int i = 0; i < W; i++) begin
      t[i] = 5'(a[4*i +: 4]) + 5'(b[4*i +: 4]);
      g[i] = (t[i] >= 5'd10);
      p[i] = (t[i] == 5'd9);
      c[i] = cy;
      cy   = g[i] | (p[i] & cy);
    end
    c[W] = cy;
    for (int i = 0; i < W; i++) begin
      logic [4:0] u;
      u = t[i] + 5'(c[i]);
      sum[4*i +: 4] = (u >= 5'd10) ? 4'(u - 5'd10) : u[3:0];
    end
    cout = c[W];
  end
endmodule
