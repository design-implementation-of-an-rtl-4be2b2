// bcd_multiplier: fully pipelined N x M digit BCD multiplier, P = A x B.
//
// The multiplier B is recoded into signed digits in {-5..+5} (sd_recoder),
// so that each partial product is one of five precomputed multiples of A
// (multiples_gen), possibly complemented (pp_gen). The M+1 partial products,
// all in BCD-4221, are cut into NBLK blocks and each block is compressed to a
// carry-save pair by a decimal Q:2 CSA (csa_reduction_tree). Each pair is
// added two digits at a time by the adder recoding (adder_recoding), and a
// tree of carry-chain decimal adders (decimal_adder_tree) sums the blocks
// into the BCD-8421 product.
// Pipeline stages (one register each):
//   1  input registers for A and B
//   2  multiples 1A..5A and recoded digits of B
//   3  partial products and Q:2 reduction (S, 2H per block)
//   4  adder recoding (D, pair carries per block)
//   5 .. 4+L  decimal adder tree, L = clog2(NBLK) + 1 levels
// so the latency is LAT = 5 + clog2(NBLK) cycles (7 for the default 16 x 16
// with 4 blocks) and a new operation can start every cycle.
// Interface: a (N digits) and b (M digits) are unsigned BCD-8421, packed with
// digit 0 in bits 3:0, and are sampled with in_valid on a rising clk edge;
// p (N+M BCD digits) and out_valid appear LAT rising edges later. rst_n is a
// synchronous active-low reset of the valid pipeline only.
// The units, the coding of every stage, the block cut and the count of adder
// levels follow the document; the stage boundaries inside the first four
// stages and the valid/reset handshake are this design's choice.
module bcd_multiplier #(
  parameter int N    = 16,
  parameter int M    = 16,
  parameter int NBLK = 4,
  localparam int R   = M / NBLK,
  localparam int WB  = N + R + 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [4*N-1:0]     a,
  input  logic [4*M-1:0]     b,
  output logic [4*(N+M)-1:0] p,
  output logic               out_valid
);
  localparam int MW = 4 * (N + 1);

  // ---- stage 1: operand registers ----
  logic [4*N-1:0] a_q;
  logic [4*M-1:0] b_q;
  logic [3:0]     vld; // valid bits of stages 1..4

  always_ff @(posedge clk) begin
    a_q <= a;
    b_q <= b;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], in_valid};
  end

  // ---- stage 2: multiples of A, recoding of B ----
  logic [MW-1:0]  m1, m2, m3, m4, m5;
  logic [M:0]      sgn;
  logic [M:0][4:0] mag;

  multiples_gen #(.N(N)) u_mult (
    .a(a_q), .m1(m1), .m2(m2), .m3(m3), .m4(m4), .m5(m5)
  );

  sd_recoder #(.M(M)) u_rec (.b(b_q), .sgn(sgn), .mag(mag));

  logic [MW-1:0]   m1_q, m2_q, m3_q, m4_q, m5_q;
  logic [M:0]      sgn_q;
  logic [M:0][4:0] mag_q;

  always_ff @(posedge clk) begin
    m1_q  <= m1;
    m2_q  <= m2;
    m3_q  <= m3;
    m4_q  <= m4;
    m5_q  <= m5;
    sgn_q <= sgn;
    mag_q <= mag;
  end

  // ---- stage 3: partial products and Q:2 reduction ----
  logic [M:0][MW-1:0] pp;

  for (genvar k = 0; k <= M; k++) begin : g_pp
    pp_gen #(.N(N)) u_pp (
      .m1(m1_q), .m2(m2_q), .m3(m3_q), .m4(m4_q), .m5(m5_q),
      .sgn(sgn_q[k]), .mag(mag_q[k]), .pp(pp[k])
    );
  end

  logic [NBLK-1:0][4*WB-1:0] s, h2, s_q, h2_q;

  csa_reduction_tree #(.N(N), .M(M), .NBLK(NBLK)) u_red (
    .pp(pp), .sgn(sgn_q), .s(s), .h2(h2)
  );

  always_ff @(posedge clk) begin
    s_q  <= s;
    h2_q <= h2;
  end

  // ---- stage 4: adder recoding per block ----
  logic [NBLK-1:0][4*WB-1:0] d, d_q;
  logic [NBLK-1:0][WB-1:0]   c, c_q;

  for (genvar bk = 0; bk < NBLK; bk++) begin : g_rec
    adder_recoding #(.W(WB)) u_arec (
      .s(s_q[bk]), .h2(h2_q[bk]), .d(d[bk]), .c(c[bk])
    );
  end

  always_ff @(posedge clk) begin
    d_q <= d;
    c_q <= c;
  end

  // ---- stages 5 ..: decimal adder tree ----
  decimal_adder_tree #(.N(N), .M(M), .NBLK(NBLK)) u_tree (
    .clk(clk), .rst_n(rst_n), .in_valid(vld[3]), .d(d_q), .c(c_q),
    .p(p), .out_valid(out_valid)
  );

  // Operands must be BCD-8421 digits.
  always_ff @(posedge clk) begin
    if (rst_n && in_valid) begin
      for (int i = 0; i < N; i++)
        assert (a[4*i +: 4] <= 4'd9) else $error("bcd_multiplier: a is not BCD");
      for (int i = 0; i < M; i++)
        assert (b[4*i +: 4] <= 4'd9) else $error("bcd_multiplier: b is not BCD");
    end
  end

  initial begin
    assert (M % NBLK == 0) else $fatal(1, "bcd_multiplier: NBLK must divide M");
  end
endmodule
