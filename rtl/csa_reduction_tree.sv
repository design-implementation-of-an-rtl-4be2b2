// csa_reduction_tree: alignment of the M+1 partial products into blocks and
// their decimal Q:2 carry-save reduction.
//
// Partial product k (k = 0..M) has weight 10^k. The rows are cut into NBLK
// blocks of R = M/NBLK rows; block 0 also takes row 0, so it holds R+1 rows
// and block b > 0 holds rows b*R+1 .. (b+1)*R. Every block is a window of
// WB = N + R + 3 digits whose digit 0 has weight 10^(b*R); each block is
// summed by its own dec_csa_q2 (a 5:2 and three 4:2 compressors for
// N = M = 16, NBLK = 4) into a 10's-complement pair S, 2H modulo 10^WB.
// Within a window a row occupies N+1 digits. A negative row arrives as the
// 9's complement of its multiple; the window digits above it are filled with
// 9 (sign extension) and its missing +1, the "hot one", is placed in the row
// just above it, in the free digit below that row's lowest digit. The hot
// one of the last row of a block therefore lands in digit 0 of the next
// block. Row M is never negative.
// Interface: pp[k] is row k (N+1 packed BCD-4221 digits) and sgn[k] its sign;
// s[b], h2[b] are the two WB-digit BCD-4221 outputs of block b.
// Combinational.
// Block sizes, window width and hot-one placement follow the document; the
// plain 9-digit sign extension (instead of a compact sign encoding) is this
// design's choice.
module csa_reduction_tree #(
  parameter int N    = 16,
  parameter int M    = 16,
  parameter int NBLK = 4,
  localparam int R   = M / NBLK,
  localparam int WB  = N + R + 3
) (
  input  logic [M:0][4*(N+1)-1:0] pp,
  input  logic [M:0]              sgn,
  output logic [NBLK-1:0][4*WB-1:0] s,
  output logic [NBLK-1:0][4*WB-1:0] h2
);
  // first row of block b
  function automatic int first_row(input int blk);
    return (blk == 0) ? 0 : blk * R + 1;
  endfunction

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    localparam int K0 = first_row(b);
    localparam int Q  = (b == 0) ? R + 1 : R;

    logic [Q-1:0][4*WB-1:0] ops;

    always_comb begin
      for (int r = 0; r < Q; r++) begin
        int k;
        int j;
        k = K0 + r;       // row number
        j = k - b * R;    // position of its digit 0 in the window
        ops[r] = '0;
        for (int d = 0; d < WB; d++) begin
          if (d >= j && d <= j + N) begin
            ops[r][4*d +: 4] = pp[k][4*(d-j) +: 4];
          end else if (d > j + N) begin
            ops[r][4*d +: 4] = {4{sgn[k]}};
          end else if (d == j - 1 && k > 0) begin
            ops[r][4*d +: 4] = {3'b000, sgn[k-1]};
          end
        end
      end
    end

    dec_csa_q2 #(.Q(Q), .W(WB)) u_q2 (.ops(ops), .s(s[b]), .h2(h2[b]));
  end

  initial begin
    assert (M % NBLK == 0) else $fatal(1, "csa_reduction_tree: NBLK must divide M");
  end
endmodule
