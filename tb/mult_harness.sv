// mult_harness: drives one bcd_multiplier instance with a stream of
// operations and checks every product and its latency. The testbench
// connects the multiplier's ports and a few of its internal signals.
//
// Operands are random BCD numbers, with some all-nines, all-zero and
// sparse operands mixed in; in_valid is dropped at random to leave bubbles.
// The expected product is worked out by schoolbook long multiplication on
// digit arrays, independently of the design, and is due exactly
// LAT = clog2(NBLK) + 5 cycles after the operands were sampled.
// Besides the products the harness counts how often the design's mechanisms
// were exercised (negative partial products, negative zero digits, hot ones
// crossing into the next block, pair carries out of the adder recoding,
// negative block sums, back-to-back operations, bubbles) and counts a failure
// for each that never happened.
// Ports: clk, rst_n in; done, checks, failures out.
module mult_harness #(
  parameter int N    = 16,
  parameter int M    = 16,
  parameter int NBLK = 4,
  parameter int NOPS = 200,
  parameter bit QUIET = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  // to and from the multiplier
  output logic                in_valid,
  output logic [4*N-1:0]      a,
  output logic [4*M-1:0]      b,
  input  logic [4*(N+M)-1:0]  p,
  input  logic                out_valid,
  // internal views of the multiplier
  input  logic                st3_valid,   // stage 3 holds an operation
  input  logic [M:0]          st3_sgn,     // its recoded signs
  input  logic [M:0][4:0]     st3_mag,     // its recoded magnitudes
  input  logic                st5_valid,   // stage 5 holds an operation
  input  logic                st5_carry,   // some adder-recoding pair carry set
  input  logic                st5_neg_blk0,// block 0 sum is negative
  output logic                done,
  output int                  checks,
  output int                  failures
);
  localparam int LAT = $clog2(NBLK) + 5;
  localparam int P   = N + M;

  function automatic logic [4*P-1:0] ref_mul(input logic [4*N-1:0] x,
                                            input logic [4*M-1:0] y);
    int acc [P+1];
    logic [4*P-1:0] r;
    for (int k = 0; k <= P; k++) acc[k] = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < M; j++)
        acc[i+j] += int'(x[4*i +: 4]) * int'(y[4*j +: 4]);
    for (int k = 0; k < P; k++) begin
      acc[k+1] += acc[k] / 10;
      acc[k]    = acc[k] % 10;
    end
    for (int k = 0; k < P; k++) r[4*k +: 4] = 4'(acc[k]);
    return r;
  endfunction

  function automatic logic [3:0] rnd_digit(input int kind);
    case (kind)
      0: return 4'd9;
      1: return 4'd0;
      2: return ($urandom_range(0, 3) == 0) ? 4'($urandom_range(0, 9)) : 4'd0;
      3: return ($urandom_range(0, 1) == 0) ? 4'd9 : 4'd5;
      default: return 4'($urandom_range(0, 9));
    endcase
  endfunction

  typedef struct {
    longint         due;
    logic [4*P-1:0] prod;
  } exp_t;

  exp_t   expq[$];
  longint cyc;
  int     issued;
  int     seen_neg_pp, seen_neg_zero, seen_hot_cross, seen_pair_carry;
  int     seen_neg_block, seen_b2b, seen_bubble, seen_max;
  logic   prev_valid;

  // drive
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_valid   <= 1'b0;
      a          <= '0;
      b          <= '0;
      issued     <= 0;
      prev_valid <= 1'b0;
    end else begin
      prev_valid <= in_valid;
      if (issued < NOPS && $urandom_range(0, 9) != 0) begin
        int ka, kb;
        logic [4*N-1:0] na;
        logic [4*M-1:0] nb;
        ka = $urandom_range(0, 9);
        kb = $urandom_range(0, 9);
        if (issued == 0) begin ka = 0; kb = 0; end // all nines first
        for (int i = 0; i < N; i++) na[4*i +: 4] = rnd_digit(ka);
        for (int i = 0; i < M; i++) nb[4*i +: 4] = rnd_digit(kb);
        a        <= na;
        b        <= nb;
        in_valid <= 1'b1;
        issued   <= issued + 1;
      end else begin
        in_valid <= 1'b0;
      end
    end
  end

  // expected results, mechanism counters and checks
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0;
    end else begin
      cyc <= cyc + 1;
      if (in_valid) begin
        exp_t e;
        e.due  = cyc + LAT;
        e.prod = ref_mul(a, b);
        expq.push_back(e);
        if (prev_valid) seen_b2b++;
        if (a == {N{4'd9}} && b == {M{4'd9}}) seen_max++;
      end else if (issued > 0 && issued < NOPS) begin
        seen_bubble++;
      end
      // stage 3 view: recoded digits of the operation in flight
      if (st3_valid) begin
        if (|st3_sgn) seen_neg_pp++;
        for (int k = 0; k <= M; k++)
          if (st3_sgn[k] && st3_mag[k] == 5'd0) seen_neg_zero++;
        for (int bk = 1; bk < NBLK; bk++)
          if (st3_sgn[bk*(M/NBLK)]) seen_hot_cross++;
      end
      // stage 5 view: pair carries of the adder recoding, block 0 sign
      if (st5_valid && st5_carry) seen_pair_carry++;
      if (st5_valid && st5_neg_blk0) seen_neg_block++;
      // output
      if (out_valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("N=%0d M=%0d: unexpected output", N, M);
        end else begin
          exp_t e;
          e = expq.pop_front();
          if (e.due != cyc || e.prod != p) begin
            failures++;
            if (failures < 5)
              $display("N=%0d M=%0d NBLK=%0d: got %h at cycle %0d, expected %h at %0d",
                       N, M, NBLK, p, cyc, e.prod, e.due);
          end
        end
      end else if (expq.size() > 0 && expq[0].due <= cyc) begin
        checks++;
        failures++;
        $display("N=%0d M=%0d: product missing at cycle %0d", N, M, cyc);
        void'(expq.pop_front());
      end
    end
  end

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    seen_neg_pp = 0; seen_neg_zero = 0; seen_hot_cross = 0; seen_pair_carry = 0;
    seen_neg_block = 0; seen_b2b = 0; seen_bubble = 0; seen_max = 0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    @(posedge clk);
    while (!(issued == NOPS && expq.size() == 0)) @(posedge clk);
    if (!QUIET)
      $display("N=%0d M=%0d NBLK=%0d latency=%0d: neg_pp=%0d neg_zero=%0d hot_cross=%0d pair_carry=%0d neg_block=%0d b2b=%0d bubble=%0d max=%0d",
               N, M, NBLK, LAT, seen_neg_pp, seen_neg_zero, seen_hot_cross, seen_pair_carry,
               seen_neg_block, seen_b2b, seen_bubble, seen_max);
    checks += 8;
    if (seen_neg_pp == 0)     begin failures++; $display("never: negative partial product"); end
    if (seen_neg_zero == 0)   begin failures++; $display("never: negative zero digit"); end
    if (seen_hot_cross == 0 && NBLK > 1) begin failures++; $display("never: hot one into next block"); end
    if (seen_pair_carry == 0) begin failures++; $display("never: pair carry"); end
    if (seen_neg_block == 0 && NBLK > 1) begin failures++; $display("never: negative block sum"); end
    if (seen_b2b == 0)        begin failures++; $display("never: back-to-back operations"); end
    if (seen_bubble == 0)     begin failures++; $display("never: bubble"); end
    if (seen_max == 0)        begin failures++; $display("never: all-nines operands"); end
    done = 1'b1;
  end
endmodule
