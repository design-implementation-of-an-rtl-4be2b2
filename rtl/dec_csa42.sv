// dec_csa42: decimal 4:2 carry-save compressor in BCD-4221.
//
// Four W-digit BCD-4221 operands are reduced to S and 2H with
// A + B + C + D = S + 2H modulo 10^W. A binary 4:3 counter per bit
// (bin_csa43) produces one 4221 digit vector of weight 1 and two of weight 2;
// the weight-2 vectors are doubled by 2X blocks (dec_x2) and a decimal 3:2
// CSA (dec_csa32) reduces the three results to two.
// Interface: ops[j] is operand j, W packed 4221 digits. Combinational.
// Follows the document's construction of decimal Q:2 compressors from binary
// counters and 2X blocks.
module dec_csa42 #(
  parameter int W = 16
) (
  input  logic [3:0][4*W-1:0] ops,
  output logic [4*W-1:0]      s,
  output logic [4*W-1:0]      h2
);
  logic [4*W-1:0] z, p, q, p2, q2;
  logic           unused_p, unused_q, unused_c;

  for (genvar k = 0; k < 4 * W; k++) begin : g_cnt
    bin_csa43 u_cnt (
      .b ({ops[3][k], ops[2][k], ops[1][k], ops[0][k]}),
      .z (z[k]), .c1(p[k]), .c2(q[k])
    );
  end

  dec_x2 #(.W(W)) u_x2p (.x(p), .y(p2), .cout(unused_p));
  dec_x2 #(.W(W)) u_x2q (.x(q), .y(q2), .cout(unused_q));

  dec_csa32 #(.W(W)) u_csa (
    .a(z), .b(p2), .c(q2), .s(s), .h2(h2), .cout(unused_c)
  );
endmodule
