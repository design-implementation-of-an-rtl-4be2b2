// tb_decimal_adder_tree: checks the pipelined adder tree for 4 x 8 digits in
// 4 blocks (R = 2, WB = 9 digits, L = 3 levels).
// Each cycle random block inputs are applied: D as random BCD-4221 patterns
// and pair carries at even positions. The expected output is the sum of the
// blocks, each read as D + c modulo 10^WB, taken as a signed 10's-complement
// number and weighted by 10^(b*R), all modulo 10^12. It must appear with
// out_valid exactly L cycles after in_valid; bubbles are inserted at random.
module tb_decimal_adder_tree;
  localparam int N = 4, M = 8, NBLK = 4;
  localparam int R = M / NBLK, WB = N + R + 3, P = N + M, L = 3;
  logic clk = 1'b0, rst_n = 1'b0, in_valid, out_valid;
  logic [NBLK-1:0][4*WB-1:0] d;
  logic [NBLK-1:0][WB-1:0]   c;
  logic [4*P-1:0]            p;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  decimal_adder_tree #(.N(N), .M(M), .NBLK(NBLK)) dut (
    .clk, .rst_n, .in_valid, .d, .c, .p, .out_valid
  );

  function automatic longint dec4221(input logic [4*WB-1:0] v);
    longint r = 0;
    for (int i = WB - 1; i >= 0; i--)
      r = r * 10 + 4 * v[4*i+3] + 2 * v[4*i+2] + 2 * v[4*i+1] + v[4*i];
    return r;
  endfunction

  function automatic longint bcd_val(input logic [4*P-1:0] v);
    longint r = 0;
    for (int i = P - 1; i >= 0; i--) r = r * 10 + longint'(v[4*i +: 4]);
    return r;
  endfunction

  longint exp_at [longint];
  longint cyc = 0;

  initial begin
    longint pow10 [20];
    pow10[0] = 1;
    for (int i = 1; i < 20; i++) pow10[i] = pow10[i-1] * 10;
    in_valid = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk);
      cyc++;
      if ($urandom_range(0, 4) == 0) begin
        in_valid <= 1'b0;
      end else begin
        longint tot;
        tot = 0;
        for (int bk = 0; bk < NBLK; bk++) begin
          longint v, cv;
          logic [4*WB-1:0] dv;
          logic [WB-1:0]   cb;
          dv = {$urandom, $urandom};
          cb = '0;
          for (int i = 2; i < WB; i += 2) cb[i] = 1'($urandom);
          cv = 0;
          for (int i = WB - 1; i >= 0; i--) cv = cv * 10 + longint'(cb[i]);
          d[bk] <= dv;
          c[bk] <= cb;
          v = (dec4221(dv) + cv) % pow10[WB];
          if (v >= pow10[WB] / 2) v -= pow10[WB];
          tot += v * pow10[bk*R];
        end
        tot = ((tot % pow10[P]) + pow10[P]) % pow10[P];
        in_valid <= 1'b1;
        exp_at[cyc + L] = tot;
      end
    end
    repeat (L + 2) begin
      @(posedge clk);
      cyc++;
      in_valid <= 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare: the value driven in cycle n is sampled at edge n+1 and the
  // result appears L edges later
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      if (exp_at.exists(cyc)) begin
        checks++;
        if (!out_valid || bcd_val(p) != exp_at[cyc]) begin
          failures++;
          if (failures < 5) $display("cycle %0d: valid=%b p=%0d expected %0d", cyc, out_valid, bcd_val(p), exp_at[cyc]);
        end
      end else if (out_valid) begin
        checks++;
        failures++;
        $display("cycle %0d: unexpected out_valid", cyc);
      end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
