// tb_bcd_multiplier_full: the multiplier at its default size, 16 x 16 digits
// with 4 reduction blocks, instantiated without parameter overrides.
// mult_harness streams operations into it (with bubbles), checks every
// 32-digit product against a long-multiplication reference and checks that it
// appears exactly 7 cycles after its operands, and requires every datapath
// mechanism to have occurred.
module tb_bcd_multiplier_full;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid, out_valid, done;
  logic [63:0]   a, b;
  logic [127:0]  p;
  int            checks, failures;

  bcd_multiplier dut (
    .clk, .rst_n, .in_valid, .a, .b, .p, .out_valid
  );

  mult_harness #(.N(16), .M(16), .NBLK(4), .NOPS(2000)) h (
    .clk, .rst_n, .in_valid, .a, .b, .p, .out_valid,
    .st3_valid(dut.vld[1]), .st3_sgn(dut.sgn_q), .st3_mag(dut.mag_q),
    .st5_valid(dut.vld[3]), .st5_carry(|dut.c_q),
    .st5_neg_blk0(dut.u_tree.g_blk[0].bsum[91 -: 4] >= 4'd5),
    .done, .checks, .failures
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!done) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
