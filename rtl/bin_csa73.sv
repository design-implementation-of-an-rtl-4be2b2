// bin_csa73: binary 7:3 counter.
//
// Counts seven bits of equal weight into three bits of weights 1, 2 and 4:
// sum(b) = z + 2*c2 + 4*c4. Two full adders take b0..b2 and b3..b5; a third
// adds their two sum bits and b6, giving z. The three weight-2 carries are
// counted by a fourth full adder into c2 and c4. Combinational.
// Three full adders and seven inputs follow the document; how the weight-2
// carries are combined (a full adder, so that all counts up to 7 are
// representable) is this design's choice.
module bin_csa73 (
  input  logic [6:0] b,
  output logic       z,
  output logic       c2,
  output logic       c4
);
  logic s0, s1, k0, k1, k2;

  full_adder u_fa0 (.a(b[0]), .b(b[1]), .c(b[2]), .s(s0), .co(k0));
  full_adder u_fa1 (.a(b[3]), .b(b[4]), .c(b[5]), .s(s1), .co(k1));
  full_adder u_fa2 (.a(s0),   .b(s1),   .c(b[6]), .s(z),  .co(k2));
  full_adder u_fa3 (.a(k0),   .b(k1),   .c(k2),   .s(c2), .co(c4));
endmodule
