// tb_dec_x2: checks the 2X block on 6-digit BCD-4221 vectors:
// 2 * X = Y + cout * 10^6, all decoded with the 4221 weights.
module tb_dec_x2;
  localparam int W = 6;
  logic [4*W-1:0] x, y;
  logic           cout;
  int             checks = 0, failures = 0;

  dec_x2 #(.W(W)) dut (.x, .y, .cout);

  function automatic longint dec4221(input logic [4*W-1:0] v);
    longint r = 0;
    for (int i = W - 1; i >= 0; i--)
      r = r * 10 + 4 * v[4*i+3] + 2 * v[4*i+2] + 2 * v[4*i+1] + v[4*i];
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      x = (t % 5 == 0) ? '1 : 24'($urandom);
      #1;
      checks++;
      if (2 * dec4221(x) != dec4221(y) + 1000000 * longint'(cout)) begin
        failures++;
        if (failures < 5) $display("x=%h: y=%h cout=%b", x, y, cout);
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
