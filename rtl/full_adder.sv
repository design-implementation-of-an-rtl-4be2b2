// full_adder: binary 3:2 carry-save cell.
//
// Adds three bits of equal weight: s carries weight 1 and co weight 2, so
// a + b + c = s + 2*co. It is the basic cell of every carry-save compressor
// in this design. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ c;
  assign co = (a & b) | (a & c) | (b & c);
endmodule
