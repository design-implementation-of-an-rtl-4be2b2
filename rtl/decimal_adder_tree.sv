// decimal_adder_tree: pipelined tree of P-G decimal adders that turns the
// per-block results of the carry-save reduction into the BCD-8421 product.
//
// Level 1 (one pipeline stage): for every block the BCD-4221 vector D from
// the adder recoding is recoded to BCD-8421, the pair-carry vector c is read
// as a BCD number whose digits are 0 or 1, and a WB-digit pg_adder adds the
// two. The result is the block's sum as a WB-digit 10's-complement number; it
// is aligned to its weight 10^(b*R) and sign-extended (with 9s when its top
// digit is 5 or more) to the full P = N+M digits.
// Levels 2 .. L (one pipeline stage each): pairs of block sums are added by
// P-digit pg_adders, modulo 10^P, until one number is left; an odd one out
// is only registered. With NBLK blocks there are L = clog2(NBLK) + 1 levels.
// The final sum is the non-negative product A x B.
// Interface: d[b], c[b] are block b's adder-recoding outputs, in_valid marks
// them; p and out_valid follow L clock cycles later. Only the valid bits are
// reset (rst_n, synchronous, active low); the data registers are not.
// The number of levels and the 10's-complement P-G additions follow the
// document; the full-width sign extension after level 1 is this design's
// choice.
module decimal_adder_tree
  import bcd_pkg::*;
#(
  parameter int N    = 16,
  parameter int M    = 16,
  parameter int NBLK = 4,
  localparam int R   = M / NBLK,
  localparam int WB  = N + R + 3,
  localparam int P   = N + M,
  localparam int L   = $clog2(NBLK) + 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [NBLK-1:0][4*WB-1:0] d,
  input  logic [NBLK-1:0][WB-1:0]   c,
  output logic [4*P-1:0]            p,
  output logic                      out_valid
);
  // number of operands at level l (level 0 = the aligned block sums)
  function automatic int count_at(input int l);
    int n;
    n = NBLK;
    for (int i = 0; i < l; i++) n = (n + 1) / 2;
    return n;
  endfunction

  logic [4*P-1:0] lvl [L][NBLK];
  logic [L-1:0]   vld;

  // ---- level 1: resolve each block and align it ----
  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    logic [4*WB-1:0] d8421, c8421, bsum;
    logic [4*P-1:0]  aligned;
    logic            unused_cout;

    always_comb begin
      for (int i = 0; i < WB; i++) begin
        d8421[4*i +: 4] = val_4221(d[b][4*i +: 4]);
        c8421[4*i +: 4] = {3'b000, c[b][i]};
      end
    end

    pg_adder #(.W(WB)) u_add (
      .a(d8421), .b(c8421), .cin(1'b0), .sum(bsum), .cout(unused_cout)
    );

    always_comb begin
      logic neg;
      neg = (bsum[4*WB-1 -: 4] >= 4'd5);
      for (int i = 0; i < P; i++) begin
        if (i < b * R)           aligned[4*i +: 4] = 4'd0;
        else if (i < b * R + WB) aligned[4*i +: 4] = bsum[4*(i-b*R) +: 4];
        else                     aligned[4*i +: 4] = neg ? 4'd9 : 4'd0;
      end
    end

    always_ff @(posedge clk) lvl[0][b] <= aligned;
  end

  // ---- levels 2 .. L: pairwise P-G additions ----
  for (genvar l = 1; l < L; l++) begin : g_lvl
    localparam int NPREV = count_at(l - 1);
    localparam int NCUR  = count_at(l);
    for (genvar i = 0; i < NBLK; i++) begin : g_op
      if (i < NCUR && 2 * i + 1 < NPREV) begin : g_add
        logic [4*P-1:0] sum;
        logic           unused_cout;
        pg_adder #(.W(P)) u_add (
          .a(lvl[l-1][2*i]), .b(lvl[l-1][2*i+1]), .cin(1'b0),
          .sum(sum), .cout(unused_cout)
        );
        always_ff @(posedge clk) lvl[l][i] <= sum;
      end else if (i < NCUR) begin : g_pass
        always_ff @(posedge clk) lvl[l][i] <= lvl[l-1][2*i];
      end else begin : g_none
        assign lvl[l][i] = '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= L'({vld, in_valid});
  end

  assign p         = lvl[L-1][0];
  assign out_valid = vld[L-1];
endmodule
