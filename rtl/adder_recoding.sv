// adder_recoding: BCD-4221 adder recoding of a carry-save pair S, 2H.
//
// The digits of S and 2H are taken two at a time. For digit pair g (digits
// 2g and 2g+1) the two 2-digit numbers are added, 2H(g) + S(g), giving the
// 4221 digits D0(g) (low) and D1(g) (high) and a carry out of the pair:
//   low digit:  binary add of the two digit values, then a correction that
//               subtracts 10 and raises a carry when the sum reaches 10;
//   high digit: the same binary add and correction, then a second binary
//               add of the low digit's carry with its own correction.
// The pair carries are not propagated: they leave as the vector c, already
// aligned (c[2g+2] is the carry of pair g), for the decimal adder that
// follows. Hence S + 2H = D + c modulo 10^W, with every carry a single bit
// two digits apart. For odd W the top pair has a zero high digit on input.
// Interface: s, h2 and d are W packed BCD-4221 digits; c has one bit per
// digit position (only even positions above 0 can be set). Combinational.
// The two-digit grouping, the binary adders with correction and the internal
// carry from D0 to D1 follow the document; the exact correction logic is this
// design's own.
module adder_recoding
  import bcd_pkg::*;
#(
  parameter int W = 23
) (
  input  logic [4*W-1:0] s,
  input  logic [4*W-1:0] h2,
  output logic [4*W-1:0] d,
  output logic [W-1:0]   c
);
  localparam int G  = (W + 1) / 2; // digit pairs
  localparam int WE = 2 * G;       // W rounded up to even

  logic [4*WE-1:0] s_e, h_e, d_e;
  logic [G-1:0]    gc;             // carry out of each pair

  assign s_e = (4*WE)'(s);
  assign h_e = (4*WE)'(h2);

  always_comb begin
    for (int g = 0; g < G; g++) begin
      logic [4:0] lo, hi, t;
      logic       k0, k1, k2;
      // low digit: binary add and correction
      lo = 5'(val_4221(h_e[8*g +: 4])) + 5'(val_4221(s_e[8*g +: 4]));
      k0 = (lo >= 5'd10);
      if (k0) lo = lo - 5'd10;
      // high digit: binary add and correction
      hi = 5'(val_4221(h_e[8*g+4 +: 4])) + 5'(val_4221(s_e[8*g+4 +: 4]));
      k1 = (hi >= 5'd10);
      if (k1) hi = hi - 5'd10;
      // second binary add: carry from the low digit
      t  = hi + 5'(k0);
      k2 = (t == 5'd10);
      if (k2) t = 5'd0;
      d_e[8*g +: 4]   = to_4221(lo[3:0]);
      d_e[8*g+4 +: 4] = to_4221(t[3:0]);
      gc[g] = k1 | k2;
    end
  end

  // for odd W the high digit of the top pair lies above the window
  if (WE > W) begin : g_pad
    logic unused_pad;
    assign unused_pad = ^d_e[4*WE-1:4*W];
  end

  always_comb begin
    d = d_e[4*W-1:0];
    c = '0;
    for (int g = 0; g < G; g++) begin
      if (2 * g + 2 < W) c[2*g+2] = gc[g];
    end
  end
endmodule
