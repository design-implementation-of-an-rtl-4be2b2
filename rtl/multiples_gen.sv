// multiples_gen: multiplicand multiples 1A, 2A, 3A, 4A and 5A in BCD-4221.
//
// The N-digit BCD-8421 multiplicand A gives five (N+1)-digit multiples, each
// in BCD-4221, from recodings and fixed shifts:
//   1A  each digit recoded 8421 -> 4221;
//   2A  each digit recoded 8421 -> 5421 and the whole vector shifted left one
//       bit, which yields 2A in BCD-8421; that is recoded 8421 -> 4221;
//   4A  2A (BCD-8421) recoded to 5211 and shifted left one bit, which yields
//       4A directly in BCD-4221;
//   3A  A + 2A in a decimal P-G adder (pg_adder), recoded 8421 -> 4221;
//   5A  A shifted left three bits reads as 5A in BCD-5421; recoded to 4221.
// Interface: a is N packed BCD digits (digit 0 in bits 3:0); m1..m5 are N+1
// packed BCD-4221 digits. Purely combinational.
// The recodings and shifts follow the document; the digit patterns chosen for
// 4221 and 5211 are given in bcd_pkg.
module multiples_gen
  import bcd_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [4*N-1:0]     a,
  output logic [4*(N+1)-1:0] m1,
  output logic [4*(N+1)-1:0] m2,
  output logic [4*(N+1)-1:0] m3,
  output logic [4*(N+1)-1:0] m4,
  output logic [4*(N+1)-1:0] m5
);
  logic [4*(N+1)-1:0] a_ext;     // A with a leading zero digit, BCD-8421
  logic [4*(N+1)-1:0] a5421;     // A in BCD-5421
  logic [4*(N+1)-1:0] two_a;     // 2A in BCD-8421
  logic [4*(N+1)-1:0] two_a5211; // 2A in BCD-5211
  logic [4*(N+1)-1:0] three_a;   // 3A in BCD-8421
  logic [4*(N+1)-1:0] five_a;    // 5A in BCD-5421
  logic               unused_cout;
  logic               unused_top;  // 5-bits of the top digits, always 0

  assign unused_top = a5421[4*(N+1)-1] ^ two_a5211[4*(N+1)-1];

  assign a_ext = {4'b0000, a};

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      a5421[4*i +: 4] = to_5421(a_ext[4*i +: 4]);
    end
    two_a = {a5421[4*(N+1)-2:0], 1'b0};
    for (int i = 0; i <= N; i++) begin
      two_a5211[4*i +: 4] = to_5211(two_a[4*i +: 4]);
    end
    five_a = {a_ext[4*(N+1)-4:0], 3'b000};
    for (int i = 0; i <= N; i++) begin
      m1[4*i +: 4] = to_4221(a_ext[4*i +: 4]);
      m2[4*i +: 4] = to_4221(two_a[4*i +: 4]);
      m3[4*i +: 4] = to_4221(three_a[4*i +: 4]);
      m5[4*i +: 4] = to_4221(val_5421(five_a[4*i +: 4]));
    end
    m4 = {two_a5211[4*(N+1)-2:0], 1'b0};
  end

  pg_adder #(.W(N + 1)) u_add3 (
    .a   (a_ext),
    .b   (two_a),
    .cin (1'b0),
    .sum (three_a),
    .cout(unused_cout)
  );
endmodule
