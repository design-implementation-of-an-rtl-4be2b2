// bin_csa43: binary 4:3 carry-save counter.
//
// Counts four bits of equal weight into one bit of weight 1 (z) and two bits
// of weight 2 (c1, c2): b0+b1+b2+b3 = z + 2*(c1 + c2). A full adder takes
// b1..b3; a half adder combines its sum with b0. Used bit-wise by the
// decimal 4:2 compressor. Combinational.
// The full adder plus half adder arrangement follows the document.
module bin_csa43 (
  input  logic [3:0] b,
  output logic       z,
  output logic       c1,
  output logic       c2
);
  logic s1;

  full_adder u_fa (.a(b[1]), .b(b[2]), .c(b[3]), .s(s1), .co(c1));

  // half adder
  assign z  = b[0] ^ s1;
  assign c2 = b[0] & s1;
endmodule
