// tb_multiples_gen: checks the multiplicand multiples 1A..5A.
// For random and corner-case 8-digit A, each BCD-4221 multiple is decoded with
// the 4221 weights and compared with k*A computed as an integer.
module tb_multiples_gen;
  localparam int N = 8;
  logic [4*N-1:0]     a;
  logic [4*(N+1)-1:0] m [5];
  int                 checks = 0, failures = 0;

  multiples_gen #(.N(N)) dut (.a, .m1(m[0]), .m2(m[1]), .m3(m[2]), .m4(m[3]), .m5(m[4]));

  function automatic longint dec4221(input logic [4*(N+1)-1:0] v);
    longint r = 0;
    for (int i = N; i >= 0; i--)
      r = r * 10 + 4 * v[4*i+3] + 2 * v[4*i+2] + 2 * v[4*i+1] + v[4*i];
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      longint x;
      case (t % 5)
        0: x = 99999999;
        1: x = longint'($urandom_range(0, 9)) * 11111111;
        default: x = longint'($urandom_range(0, 99999999));
      endcase
      for (int i = 0; i < N; i++) a[4*i +: 4] = 4'((x / (10 ** i)) % 10);
      #1;
      for (int k = 1; k <= 5; k++) begin
        checks++;
        // every digit must also be a valid 4221 digit: always true, so check value
        if (dec4221(m[k-1]) != x * k) begin
          failures++;
          if (failures < 5) $display("%0d x %0d: got %0d", x, k, dec4221(m[k-1]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
