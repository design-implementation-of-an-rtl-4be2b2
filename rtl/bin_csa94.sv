// bin_csa94: binary 9:4 counter.
//
// Counts nine bits of equal weight into four bits of weights 1, 2, 2 and 4:
// sum(b) = z + 2*(c2a + c2b) + 4*c4. A first row of three full adders takes
// b0..b2, b3..b5 and b6..b8; a second row of two full adders adds the three
// sum bits (giving z and c2a) and the three carries (giving c2b and c4).
// Combinational.
// The two rows of full adders and the output weights follow the document.
module bin_csa94 (
  input  logic [8:0] b,
  output logic       z,
  output logic       c2a,
  output logic       c2b,
  output logic       c4
);
  logic [2:0] s, k;

  for (genvar i = 0; i < 3; i++) begin : g_row1
    full_adder u_fa (.a(b[3*i]), .b(b[3*i+1]), .c(b[3*i+2]), .s(s[i]), .co(k[i]));
  end

  full_adder u_fa_s (.a(s[0]), .b(s[1]), .c(s[2]), .s(z),   .co(c2a));
  full_adder u_fa_k (.a(k[0]), .b(k[1]), .c(k[2]), .s(c2b), .co(c4));
endmodule
