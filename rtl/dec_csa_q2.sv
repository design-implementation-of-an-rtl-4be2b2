// dec_csa_q2: decimal Q:2 carry-save compressor in BCD-4221.
//
// Reduces Q W-digit BCD-4221 operands to two, S and 2H, with
// sum(ops) = S + 2H modulo 10^W. Every variant counts the operand bits of one
// bit position with a binary counter, turns the counter outputs of weight 2
// and 4 back into weight-1 digit vectors with 2X blocks (dec_x2, applied twice
// for weight 4) and finishes with a decimal 3:2 or 4:2 compressor:
//   Q = 1      S = ops[0], 2H = 0 (nothing to reduce)
//   Q = 2      S, 2H = the two operands
//   Q = 3      decimal 3:2 CSA (dec_csa32)
//   Q = 4      decimal 4:2 compressor (dec_csa42: binary 4:3 counters)
//   Q = 5..7   binary 7:3 counters (unused inputs tied to 0) give digits of
//              weight 1, 2 and 4; after 2X blocks a decimal 3:2 CSA
//   Q = 8..9   binary 9:4 counters (unused inputs tied to 0) give digits of
//              weight 1, 2, 2 and 4; after 2X blocks a decimal 4:2 compressor
//   Q > 9      a chain of decimal 3:2 CSAs first brings the count down to 9.
// Interface: ops[j] is operand j, W packed 4221 digits; s and h2 likewise.
// Combinational.
// Building decimal Q:2 compressors from binary counters and 2X blocks
// follows the document; the exact assignment of counters to each Q (for
// instance 8:2 from 9:4 counters rather than the 8:4 counters the document
// mentions but does not draw) is this design's choice.
module dec_csa_q2 #(
  parameter int Q = 4,
  parameter int W = 16
) (
  input  logic [Q-1:0][4*W-1:0] ops,
  output logic [4*W-1:0]        s,
  output logic [4*W-1:0]        h2
);
  if (Q == 1) begin : g_q1
    assign s  = ops[0];
    assign h2 = '0;
  end else if (Q == 2) begin : g_q2
    assign s  = ops[0];
    assign h2 = ops[1];
  end else if (Q == 3) begin : g_q3
    logic unused_cout;
    dec_csa32 #(.W(W)) u_csa (
      .a(ops[0]), .b(ops[1]), .c(ops[2]), .s(s), .h2(h2), .cout(unused_cout)
    );
  end else if (Q == 4) begin : g_q4
    dec_csa42 #(.W(W)) u_csa (.ops(ops), .s(s), .h2(h2));
  end else if (Q <= 7) begin : g_q7
    logic [6:0][4*W-1:0] x;
    logic [4*W-1:0]      z, c2, c4, c2x2, c4x2, c4x4;
    logic [2:0]          unused_cout;

    assign x = (7*4*W)'(ops);
    for (genvar k = 0; k < 4 * W; k++) begin : g_cnt
      bin_csa73 u_cnt (
        .b ({x[6][k], x[5][k], x[4][k], x[3][k], x[2][k], x[1][k], x[0][k]}),
        .z (z[k]), .c2(c2[k]), .c4(c4[k])
      );
    end
    dec_x2 #(.W(W)) u_x2a (.x(c2),   .y(c2x2), .cout(unused_cout[0]));
    dec_x2 #(.W(W)) u_x2b (.x(c4),   .y(c4x2), .cout(unused_cout[1]));
    dec_x2 #(.W(W)) u_x2c (.x(c4x2), .y(c4x4), .cout(unused_cout[2]));
    logic unused_c;
    dec_csa32 #(.W(W)) u_csa (
      .a(z), .b(c2x2), .c(c4x4), .s(s), .h2(h2), .cout(unused_c)
    );
  end else begin : g_q9
    // a chain of 3:2 CSAs brings Q > 9 down to 9 operands
    localparam int NST = (Q > 9) ? Q - 9 : 0;

    // g_lv[l].v[i], i < Q - l, are the operands left after l 3:2 stages
    for (genvar l = 0; l <= NST; l++) begin : g_lv
      logic [Q-1:0][4*W-1:0] v;
      if (l == 0) begin : g_first
        assign v = ops;
      end else begin : g_step
        logic unused_cout;
        // operands 0..2 of the previous level are reduced; 3.. move down
        dec_csa32 #(.W(W)) u_csa (
          .a(g_lv[l-1].v[0]), .b(g_lv[l-1].v[1]), .c(g_lv[l-1].v[2]),
          .s(v[Q-l-2]), .h2(v[Q-l-1]), .cout(unused_cout)
        );
        for (genvar i = 0; i < Q - l - 2; i++) begin : g_move
          assign v[i] = g_lv[l-1].v[i+3];
        end
        for (genvar i = Q - l; i < Q; i++) begin : g_pad
          assign v[i] = '0;
        end
      end
    end

    logic [8:0][4*W-1:0] x;
    logic [4*W-1:0]      z, ca, cb, c4, cax2, cbx2, c4x2, c4x4;
    logic [3:0]          unused_cout;

    assign x = (9*4*W)'(g_lv[NST].v[Q-NST-1:0]);
    for (genvar k = 0; k < 4 * W; k++) begin : g_cnt
      bin_csa94 u_cnt (
        .b   ({x[8][k], x[7][k], x[6][k], x[5][k], x[4][k],
               x[3][k], x[2][k], x[1][k], x[0][k]}),
        .z   (z[k]), .c2a(ca[k]), .c2b(cb[k]), .c4(c4[k])
      );
    end
    dec_x2 #(.W(W)) u_x2a (.x(ca),   .y(cax2), .cout(unused_cout[0]));
    dec_x2 #(.W(W)) u_x2b (.x(cb),   .y(cbx2), .cout(unused_cout[1]));
    dec_x2 #(.W(W)) u_x2c (.x(c4),   .y(c4x2), .cout(unused_cout[2]));
    dec_x2 #(.W(W)) u_x2d (.x(c4x2), .y(c4x4), .cout(unused_cout[3]));
    dec_csa42 #(.W(W)) u_csa (.ops({c4x4, cbx2, cax2, z}), .s(s), .h2(h2));
  end
endmodule
