// tb_table_configs_32: runs the multiplier sizes of the published result
// tables that have a 32-digit operand: N x 32 for N = 4, 8, 16, 32 (8 blocks,
// 8 pipeline stages) and 32 x M for M = 4, 8, 16 (M/4 blocks). Each instance
// streams random operations through mult_harness, which checks every product
// and its latency and requires each datapath mechanism to occur.
module tb_table_configs_32;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 7;
  logic [NCFG-1:0] done;
  int chk [NCFG];
  int fail [NCFG];

  // 32 x 4 digits, 1 block(s), 5 stages
  logic             v0, ov0;
  logic [127:0] a0;
  logic [15:0] b0;
  logic [143:0] p0;
  bcd_multiplier #(.N(32), .M(4), .NBLK(1)) dut0 (
    .clk, .rst_n, .in_valid(v0), .a(a0), .b(b0), .p(p0), .out_valid(ov0));
  mult_harness #(.N(32), .M(4), .NBLK(1), .NOPS(150), .QUIET(1'b1)) h0 (
    .clk, .rst_n, .in_valid(v0), .a(a0), .b(b0), .p(p0), .out_valid(ov0),
    .st3_valid(dut0.vld[1]), .st3_sgn(dut0.sgn_q), .st3_mag(dut0.mag_q),
    .st5_valid(dut0.vld[3]), .st5_carry(|dut0.c_q),
    .st5_neg_blk0(dut0.u_tree.g_blk[0].bsum[155 -: 4] >= 4'd5),
    .done(done[0]), .checks(chk[0]), .failures(fail[0]));

  // 32 x 8 digits, 2 block(s), 6 stages
  logic             v1, ov1;
  logic [127:0] a1;
  logic [31:0] b1;
  logic [159:0] p1;
  bcd_multiplier #(.N(32), .M(8), .NBLK(2)) dut1 (
    .clk, .rst_n, .in_valid(v1), .a(a1), .b(b1), .p(p1), .out_valid(ov1));
  mult_harness #(.N(32), .M(8), .NBLK(2), .NOPS(150), .QUIET(1'b1)) h1 (
    .clk, .rst_n, .in_valid(v1), .a(a1), .b(b1), .p(p1), .out_valid(ov1),
    .st3_valid(dut1.vld[1]), .st3_sgn(dut1.sgn_q), .st3_mag(dut1.mag_q),
    .st5_valid(dut1.vld[3]), .st5_carry(|dut1.c_q),
    .st5_neg_blk0(dut1.u_tree.g_blk[0].bsum[155 -: 4] >= 4'd5),
    .done(done[1]), .checks(chk[1]), .failures(fail[1]));

  // 32 x 16 digits, 4 block(s), 7 stages
  logic             v2, ov2;
  logic [127:0] a2;
  logic [63:0] b2;
  logic [191:0] p2;
  bcd_multiplier #(.N(32), .M(16), .NBLK(4)) dut2 (
    .clk, .rst_n, .in_valid(v2), .a(a2), .b(b2), .p(p2), .out_valid(ov2));
  mult_harness #(.N(32), .M(16), .NBLK(4), .NOPS(150), .QUIET(1'b1)) h2 (
    .clk, .rst_n, .in_valid(v2), .a(a2), .b(b2), .p(p2), .out_valid(ov2),
    .st3_valid(dut2.vld[1]), .st3_sgn(dut2.sgn_q), .st3_mag(dut2.mag_q),
    .st5_valid(dut2.vld[3]), .st5_carry(|dut2.c_q),
    .st5_neg_blk0(dut2.u_tree.g_blk[0].bsum[155 -: 4] >= 4'd5),
    .done(done[2]), .checks(chk[2]), .failures(fail[2]));

  // 4 x 32 digits, 8 block(s), 8 stages
  logic             v3, ov3;
  logic [15:0] a3;
  logic [127:0] b3;
  logic [143:0] p3;
  bcd_multiplier #(.N(4), .M(32), .NBLK(8)) dut3 (
    .clk, .rst_n, .in_valid(v3), .a(a3), .b(b3), .p(p3), .out_valid(ov3));
  mult_harness #(.N(4), .M(32), .NBLK(8), .NOPS(150), .QUIET(1'b1)) h3 (
    .clk, .rst_n, .in_valid(v3), .a(a3), .b(b3), .p(p3), .out_valid(ov3),
    .st3_valid(dut3.vld[1]), .st3_sgn(dut3.sgn_q), .st3_mag(dut3.mag_q),
    .st5_valid(dut3.vld[3]), .st5_carry(|dut3.c_q),
    .st5_neg_blk0(dut3.u_tree.g_blk[0].bsum[43 -: 4] >= 4'd5),
    .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  // 8 x 32 digits, 8 block(s), 8 stages
  logic             v4, ov4;
  logic [31:0] a4;
  logic [127:0] b4;
  logic [159:0] p4;
  bcd_multiplier #(.N(8), .M(32), .NBLK(8)) dut4 (
    .clk, .rst_n, .in_valid(v4), .a(a4), .b(b4), .p(p4), .out_valid(ov4));
  mult_harness #(.N(8), .M(32), .NBLK(8), .NOPS(150), .QUIET(1'b1)) h4 (
    .clk, .rst_n, .in_valid(v4), .a(a4), .b(b4), .p(p4), .out_valid(ov4),
    .st3_valid(dut4.vld[1]), .st3_sgn(dut4.sgn_q), .st3_mag(dut4.mag_q),
    .st5_valid(dut4.vld[3]), .st5_carry(|dut4.c_q),
    .st5_neg_blk0(dut4.u_tree.g_blk[0].bsum[59 -: 4] >= 4'd5),
    .done(done[4]), .checks(chk[4]), .failures(fail[4]));

  // 16 x 32 digits, 8 block(s), 8 stages
  logic             v5, ov5;
  logic [63:0] a5;
  logic [127:0] b5;
  logic [191:0] p5;
  bcd_multiplier #(.N(16), .M(32), .NBLK(8)) dut5 (
    .clk, .rst_n, .in_valid(v5), .a(a5), .b(b5), .p(p5), .out_valid(ov5));
  mult_harness #(.N(16), .M(32), .NBLK(8), .NOPS(150), .QUIET(1'b1)) h5 (
    .clk, .rst_n, .in_valid(v5), .a(a5), .b(b5), .p(p5), .out_valid(ov5),
    .st3_valid(dut5.vld[1]), .st3_sgn(dut5.sgn_q), .st3_mag(dut5.mag_q),
    .st5_valid(dut5.vld[3]), .st5_carry(|dut5.c_q),
    .st5_neg_blk0(dut5.u_tree.g_blk[0].bsum[91 -: 4] >= 4'd5),
    .done(done[5]), .checks(chk[5]), .failures(fail[5]));

  // 32 x 32 digits, 8 block(s), 8 stages
  logic             v6, ov6;
  logic [127:0] a6;
  logic [127:0] b6;
  logic [255:0] p6;
  bcd_multiplier #(.N(32), .M(32), .NBLK(8)) dut6 (
    .clk, .rst_n, .in_valid(v6), .a(a6), .b(b6), .p(p6), .out_valid(ov6));
  mult_harness #(.N(32), .M(32), .NBLK(8), .NOPS(150), .QUIET(1'b1)) h6 (
    .clk, .rst_n, .in_valid(v6), .a(a6), .b(b6), .p(p6), .out_valid(ov6),
    .st3_valid(dut6.vld[1]), .st3_sgn(dut6.sgn_q), .st3_mag(dut6.mag_q),
    .st5_valid(dut6.vld[3]), .st5_carry(|dut6.c_q),
    .st5_neg_blk0(dut6.u_tree.g_blk[0].bsum[155 -: 4] >= 4'd5),
    .done(done[6]), .checks(chk[6]), .failures(fail[6]));

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
