// dec_csa32: decimal 3:2 carry-save adder in BCD-4221.
//
// Three W-digit BCD-4221 operands are reduced to two, S and 2H, such that
// A + B + C = S + 2H (modulo 10^W). Because 4221 is a weighted code in which
// every bit pattern is valid, one binary full adder per bit does the digit
// work: the sum bits form the 4221 digit S(i) and the carry bits the 4221
// digit H(i). H is then doubled by the 2X block (dec_x2), whose carries move
// one digit up. cout is the carry out of the top digit (worth 10^W).
// Interface: a, b, c, s, h2 are W packed BCD-4221 digits. Combinational.
// The structure (four full adders per digit plus a 2X block) follows the
// document.
module dec_csa32 #(
  parameter int W = 16
) (
  input  logic [4*W-1:0] a,
  input  logic [4*W-1:0] b,
  input  logic [4*W-1:0] c,
  output logic [4*W-1:0] s,
  output logic [4*W-1:0] h2,
  output logic           cout
);
  logic [4*W-1:0] h;

  for (genvar k = 0; k < 4 * W; k++) begin : g_fa
    full_adder u_fa (.a(a[k]), .b(b[k]), .c(c[k]), .s(s[k]), .co(h[k]));
  end

  dec_x2 #(.W(W)) u_x2 (.x(h), .y(h2), .cout(cout));
endmodule
