// tb_pg_adder: checks the carry-chain BCD adder against integer addition.
// Random and corner-case (all nines, long carry chains) 8-digit operands with
// both carry-in values are added; the 8-digit sum and carry out are compared
// with the decimal digits of the integer sum.
module tb_pg_adder;
  localparam int W = 8;
  logic [4*W-1:0] a, b, sum;
  logic           cin, cout;
  int             checks = 0, failures = 0;

  pg_adder #(.W(W)) dut (.a, .b, .cin, .sum, .cout);

  function automatic logic [4*W-1:0] to_bcd(input longint v);
    logic [4*W-1:0] r;
    for (int i = 0; i < W; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint x, y, z;
      case (t % 4)
        0: begin x = 99999999; y = longint'($urandom_range(0, 2)); end
        1: begin x = longint'($urandom_range(0, 99999999)); y = 99999999 - x; end
        default: begin x = longint'($urandom_range(0, 99999999)); y = longint'($urandom_range(0, 99999999)); end
      endcase
      a = to_bcd(x);
      b = to_bcd(y);
      cin = 1'($urandom_range(0, 1));
      #1;
      z = x + y + longint'(cin);
      checks++;
      if (sum != to_bcd(z) || cout != (z >= 100000000)) begin
        failures++;
        if (failures < 5) $display("%0d + %0d + %0d: got %h/%b", x, y, cin, sum, cout);
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
