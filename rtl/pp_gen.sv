// pp_gen: one partial product of the signed-digit radix-10 multiplier.
//
// The one-hot magnitude of a recoded multiplier digit selects one of the
// precomputed multiples 1A..5A (all zero for a zero digit); when the digit is
// negative every bit of the selected multiple is inverted, which in BCD-4221
// is the 9's complement. The missing +1 of the 10's complement (the "hot
// one") and the sign extension are added by the reduction tree.
// Interface: m1..m5 are N+1 packed BCD-4221 digits, sgn/mag one recoded
// digit as produced by sd_recoder, pp the (N+1)-digit BCD-4221 result.
// Purely combinational: an AND-OR selector followed by XOR with the sign.
// Selection and inversion follow the document; the one-hot AND-OR form of the
// selector is this design's choice.
module pp_gen #(
  parameter int N = 16
) (
  input  logic [4*(N+1)-1:0] m1,
  input  logic [4*(N+1)-1:0] m2,
  input  logic [4*(N+1)-1:0] m3,
  input  logic [4*(N+1)-1:0] m4,
  input  logic [4*(N+1)-1:0] m5,
  input  logic               sgn,
  input  logic [4:0]         mag,
  output logic [4*(N+1)-1:0] pp
);
  localparam int PW = 4 * (N + 1);

  always_comb begin
    pp = ({PW{mag[0]}} & m1) | ({PW{mag[1]}} & m2) | ({PW{mag[2]}} & m3)
       | ({PW{mag[3]}} & m4) | ({PW{mag[4]}} & m5);
    pp = pp ^ {PW{sgn}};
  end
endmodule
