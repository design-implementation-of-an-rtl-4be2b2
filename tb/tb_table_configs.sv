// tb_table_configs: runs the multiplier sizes of the published result tables
// with up to 16 digits per operand. The nine N x M combinations of 4, 8 and 16
// digits use M/4 reduction blocks, giving 5, 6 and 7 pipeline stages for
// M = 4, 8 and 16; four more instances vary the block count of the 8 x 8 and
// 16 x 16 multipliers (5 and 7 stages for 8 x 8, 6 and 8 stages for 16 x 16).
// Each instance streams random operations through mult_harness, which checks
// every product and its latency and requires each datapath mechanism to occur.
module tb_table_configs;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 13;
  logic [NCFG-1:0] done;
  int chk [NCFG];
  int fail [NCFG];

  // 4 x 4 digits, 1 block(s), 5 stages
  logic             v0, ov0;
  logic [15:0] a0;
  logic [15:0] b0;
  logic [31:0] p0;
  bcd_multiplier #(.N(4), .M(4), .NBLK(1)) dut0 (
    .clk, .rst_n, .in_valid(v0), .a(a0), .b(b0), .p(p0), .out_valid(ov0));
  mult_harness #(.N(4), .M(4), .NBLK(1), .NOPS(150), .QUIET(1'b1)) h0 (
    .clk, .rst_n, .in_valid(v0), .a(a0), .b(b0), .p(p0), .out_valid(ov0),
    .st3_valid(dut0.vld[1]), .st3_sgn(dut0.sgn_q), .st3_mag(dut0.mag_q),
    .st5_valid(dut0.vld[3]), .st5_carry(|dut0.c_q),
    .st5_neg_blk0(dut0.u_tree.g_blk[0].bsum[43 -: 4] >= 4'd5),
    .done(done[0]), .checks(chk[0]), .failures(fail[0]));

  // 8 x 4 digits, 1 block(s), 5 stages
  logic             v1, ov1;
  logic [31:0] a1;
  logic [15:0] b1;
  logic [47:0] p1;
  bcd_multiplier #(.N(8), .M(4), .NBLK(1)) dut1 (
    .clk, .rst_n, .in_valid(v1), .a(a1), .b(b1), .p(p1), .out_valid(ov1));
  mult_harness #(.N(8), .M(4), .NBLK(1), .NOPS(150), .QUIET(1'b1)) h1 (
    .clk, .rst_n, .in_valid(v1), .a(a1), .b(b1), .p(p1), .out_valid(ov1),
    .st3_valid(dut1.vld[1]), .st3_sgn(dut1.sgn_q), .st3_mag(dut1.mag_q),
    .st5_valid(dut1.vld[3]), .st5_carry(|dut1.c_q),
    .st5_neg_blk0(dut1.u_tree.g_blk[0].bsum[59 -: 4] >= 4'd5),
    .done(done[1]), .checks(chk[1]), .failures(fail[1]));

  // 16 x 4 digits, 1 block(s), 5 stages
  logic             v2, ov2;
  logic [63:0] a2;
  logic [15:0] b2;
  logic [79:0] p2;
  bcd_multiplier #(.N(16), .M(4), .NBLK(1)) dut2 (
    .clk, .rst_n, .in_valid(v2), .a(a2), .b(b2), .p(p2), .out_valid(ov2));
  mult_harness #(.N(16), .M(4), .NBLK(1), .NOPS(150), .QUIET(1'b1)) h2 (
    .clk, .rst_n, .in_valid(v2), .a(a2), .b(b2), .p(p2), .out_valid(ov2),
    .st3_valid(dut2.vld[1]), .st3_sgn(dut2.sgn_q), .st3_mag(dut2.mag_q),
    .st5_valid(dut2.vld[3]), .st5_carry(|dut2.c_q),
    .st5_neg_blk0(dut2.u_tree.g_blk[0].bsum[91 -: 4] >= 4'd5),
    .done(done[2]), .checks(chk[2]), .failures(fail[2]));

  // 4 x 8 digits, 2 block(s), 6 stages
  logic             v3, ov3;
  logic [15:0] a3;
  logic [31:0] b3;
  logic [47:0] p3;
  bcd_multiplier #(.N(4), .M(8), .NBLK(2)) dut3 (
    .clk, .rst_n, .in_valid(v3), .a(a3), .b(b3), .p(p3), .out_valid(ov3));
  mult_harness #(.N(4), .M(8), .NBLK(2), .NOPS(150), .QUIET(1'b1)) h3 (
    .clk, .rst_n, .in_valid(v3), .a(a3), .b(b3), .p(p3), .out_valid(ov3),
    .st3_valid(dut3.vld[1]), .st3_sgn(dut3.sgn_q), .st3_mag(dut3.mag_q),
    .st5_valid(dut3.vld[3]), .st5_carry(|dut3.c_q),
    .st5_neg_blk0(dut3.u_tree.g_blk[0].bsum[43 -: 4] >= 4'd5),
    .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  // 8 x 8 digits, 2 block(s), 6 stages
  logic             v4, ov4;
  logic [31:0] a4;
  logic [31:0] b4;
  logic [63:0] p4;
  bcd_multiplier #(.N(8), .M(8), .NBLK(2)) dut4 (
    .clk, .rst_n, .in_valid(v4), .a(a4), .b(b4), .p(p4), .out_valid(ov4));
  mult_harness #(.N(8), .M(8), .NBLK(2), .NOPS(150), .QUIET(1'b1)) h4 (
    .clk, .rst_n, .in_valid(v4), .a(a4), .b(b4), .p(p4), .out_valid(ov4),
    .st3_valid(dut4.vld[1]), .st3_sgn(dut4.sgn_q), .st3_mag(dut4.mag_q),
    .st5_valid(dut4.vld[3]), .st5_carry(|dut4.c_q),
    .st5_neg_blk0(dut4.u_tree.g_blk[0].bsum[59 -: 4] >= 4'd5),
    .done(done[4]), .checks(chk[4]), .failures(fail[4]));

  // 16 x 8 digits, 2 block(s), 6 stages
  logic             v5, ov5;
  logic [63:0] a5;
  logic [31:0] b5;
  logic [95:0] p5;
  bcd_multiplier #(.N(16), .M(8), .NBLK(2)) dut5 (
    .clk, .rst_n, .in_valid(v5), .a(a5), .b(b5), .p(p5), .out_valid(ov5));
  mult_harness #(.N(16), .M(8), .NBLK(2), .NOPS(150), .QUIET(1'b1)) h5 (
    .clk, .rst_n, .in_valid(v5), .a(a5), .b(b5), .p(p5), .out_valid(ov5),
    .st3_valid(dut5.vld[1]), .st3_sgn(dut5.sgn_q), .st3_mag(dut5.mag_q),
    .st5_valid(dut5.vld[3]), .st5_carry(|dut5.c_q),
    .st5_neg_blk0(dut5.u_tree.g_blk[0].bsum[91 -: 4] >= 4'd5),
    .done(done[5]), .checks(chk[5]), .failures(fail[5]));

  // 4 x 16 digits, 4 block(s), 7 stages
  logic             v6, ov6;
  logic [15:0] a6;
  logic [63:0] b6;
  logic [79:0] p6;
  bcd_multiplier #(.N(4), .M(16), .NBLK(4)) dut6 (
    .clk, .rst_n, .in_valid(v6), .a(a6), .b(b6), .p(p6), .out_valid(ov6));
  mult_harness #(.N(4), .M(16), .NBLK(4), .NOPS(150), .QUIET(1'b1)) h6 (
    .clk, .rst_n, .in_valid(v6), .a(a6), .b(b6), .p(p6), .out_valid(ov6),
    .st3_valid(dut6.vld[1]), .st3_sgn(dut6.sgn_q), .st3_mag(dut6.mag_q),
    .st5_valid(dut6.vld[3]), .st5_carry(|dut6.c_q),
    .st5_neg_blk0(dut6.u_tree.g_blk[0].bsum[43 -: 4] >= 4'd5),
    .done(done[6]), .checks(chk[6]), .failures(fail[6]));

  // 8 x 16 digits, 4 block(s), 7 stages
  logic             v7, ov7;
  logic [31:0] a7;
  logic [63:0] b7;
  logic [95:0] p7;
  bcd_multiplier #(.N(8), .M(16), .NBLK(4)) dut7 (
    .clk, .rst_n, .in_valid(v7), .a(a7), .b(b7), .p(p7), .out_valid(ov7));
  mult_harness #(.N(8), .M(16), .NBLK(4), .NOPS(150), .QUIET(1'b1)) h7 (
    .clk, .rst_n, .in_valid(v7), .a(a7), .b(b7), .p(p7), .out_valid(ov7),
    .st3_valid(dut7.vld[1]), .st3_sgn(dut7.sgn_q), .st3_mag(dut7.mag_q),
    .st5_valid(dut7.vld[3]), .st5_carry(|dut7.c_q),
    .st5_neg_blk0(dut7.u_tree.g_blk[0].bsum[59 -: 4] >= 4'd5),
    .done(done[7]), .checks(chk[7]), .failures(fail[7]));

  // 16 x 16 digits, 4 block(s), 7 stages
  logic             v8, ov8;
  logic [63:0] a8;
  logic [63:0] b8;
  logic [127:0] p8;
  bcd_multiplier #(.N(16), .M(16), .NBLK(4)) dut8 (
    .clk, .rst_n, .in_valid(v8), .a(a8), .b(b8), .p(p8), .out_valid(ov8));
  mult_harness #(.N(16), .M(16), .NBLK(4), .NOPS(150), .QUIET(1'b1)) h8 (
    .clk, .rst_n, .in_valid(v8), .a(a8), .b(b8), .p(p8), .out_valid(ov8),
    .st3_valid(dut8.vld[1]), .st3_sgn(dut8.sgn_q), .st3_mag(dut8.mag_q),
    .st5_valid(dut8.vld[3]), .st5_carry(|dut8.c_q),
    .st5_neg_blk0(dut8.u_tree.g_blk[0].bsum[91 -: 4] >= 4'd5),
    .done(done[8]), .checks(chk[8]), .failures(fail[8]));

  // 8 x 8 digits, 1 block(s), 5 stages
  logic             v9, ov9;
  logic [31:0] a9;
  logic [31:0] b9;
  logic [63:0] p9;
  bcd_multiplier #(.N(8), .M(8), .NBLK(1)) dut9 (
    .clk, .rst_n, .in_valid(v9), .a(a9), .b(b9), .p(p9), .out_valid(ov9));
  mult_harness #(.N(8), .M(8), .NBLK(1), .NOPS(150), .QUIET(1'b1)) h9 (
    .clk, .rst_n, .in_valid(v9), .a(a9), .b(b9), .p(p9), .out_valid(ov9),
    .st3_valid(dut9.vld[1]), .st3_sgn(dut9.sgn_q), .st3_mag(dut9.mag_q),
    .st5_valid(dut9.vld[3]), .st5_carry(|dut9.c_q),
    .st5_neg_blk0(dut9.u_tree.g_blk[0].bsum[75 -: 4] >= 4'd5),
    .done(done[9]), .checks(chk[9]), .failures(fail[9]));

  // 8 x 8 digits, 4 block(s), 7 stages
  logic             v10, ov10;
  logic [31:0] a10;
  logic [31:0] b10;
  logic [63:0] p10;
  bcd_multiplier #(.N(8), .M(8), .NBLK(4)) dut10 (
    .clk, .rst_n, .in_valid(v10), .a(a10), .b(b10), .p(p10), .out_valid(ov10));
  mult_harness #(.N(8), .M(8), .NBLK(4), .NOPS(150), .QUIET(1'b1)) h10 (
    .clk, .rst_n, .in_valid(v10), .a(a10), .b(b10), .p(p10), .out_valid(ov10),
    .st3_valid(dut10.vld[1]), .st3_sgn(dut10.sgn_q), .st3_mag(dut10.mag_q),
    .st5_valid(dut10.vld[3]), .st5_carry(|dut10.c_q),
    .st5_neg_blk0(dut10.u_tree.g_blk[0].bsum[51 -: 4] >= 4'd5),
    .done(done[10]), .checks(chk[10]), .failures(fail[10]));

  // 16 x 16 digits, 2 block(s), 6 stages
  logic             v11, ov11;
  logic [63:0] a11;
  logic [63:0] b11;
  logic [127:0] p11;
  bcd_multiplier #(.N(16), .M(16), .NBLK(2)) dut11 (
    .clk, .rst_n, .in_valid(v11), .a(a11), .b(b11), .p(p11), .out_valid(ov11));
  mult_harness #(.N(16), .M(16), .NBLK(2), .NOPS(150), .QUIET(1'b1)) h11 (
    .clk, .rst_n, .in_valid(v11), .a(a11), .b(b11), .p(p11), .out_valid(ov11),
    .st3_valid(dut11.vld[1]), .st3_sgn(dut11.sgn_q), .st3_mag(dut11.mag_q),
    .st5_valid(dut11.vld[3]), .st5_carry(|dut11.c_q),
    .st5_neg_blk0(dut11.u_tree.g_blk[0].bsum[107 -: 4] >= 4'd5),
    .done(done[11]), .checks(chk[11]), .failures(fail[11]));

  // 16 x 16 digits, 8 block(s), 8 stages
  logic             v12, ov12;
  logic [63:0] a12;
  logic [63:0] b12;
  logic [127:0] p12;
  bcd_multiplier #(.N(16), .M(16), .NBLK(8)) dut12 (
    .clk, .rst_n, .in_valid(v12), .a(a12), .b(b12), .p(p12), .out_valid(ov12));
  mult_harness #(.N(16), .M(16), .NBLK(8), .NOPS(150), .QUIET(1'b1)) h12 (
    .clk, .rst_n, .in_valid(v12), .a(a12), .b(b12), .p(p12), .out_valid(ov12),
    .st3_valid(dut12.vld[1]), .st3_sgn(dut12.sgn_q), .st3_mag(dut12.mag_q),
    .st5_valid(dut12.vld[3]), .st5_carry(|dut12.c_q),
    .st5_neg_blk0(dut12.u_tree.g_blk[0].bsum[83 -: 4] >= 4'd5),
    .done(done[12]), .checks(chk[12]), .failures(fail[12]));

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!(&done)) @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    int checks, failures;
    repeat (20000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
