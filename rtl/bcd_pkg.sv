// bcd_pkg: digit codings shared by the decimal multiplier.
//
// Every decimal digit is four bits. Three weighted codings are used:
//   BCD-8421  the usual BCD, weights 8,4,2,1 (operands and product);
//   BCD-4221  weights 4,2,2,1, every 4-bit pattern is a valid digit and
//             inverting the bits gives the 9's complement (partial products,
//             carry-save reduction);
//   BCD-5211  weights 5,2,1,1, used only on the way to a doubling: a 5211
//             digit shifted left one bit becomes a 4221 digit plus a carry.
// BCD-5421 (weights 5,4,2,1) is used for doubling a BCD-8421 digit.
// The conversion into 4221 uses the "reduced" 4221 code, one fixed pattern per
// value (0000,0001,0100,0101,0110,1001,1010,1011,1110,1111 for 0..9), which is
// self-complementing. The 5211 patterns for 0..9 are this design's choice:
// 0000,0001,0100,0101,0111,1000,1001,1100,1101,1111.
// All functions are combinational and synthesizable.
package bcd_pkg;

  typedef logic [3:0] digit_t;

  // Value (0..9) of a BCD-4221 digit.
  function automatic logic [3:0] val_4221(input digit_t c);
    return 4'(c[3]) * 4'd4 + 4'(c[2]) * 4'd2 + 4'(c[1]) * 4'd2 + 4'(c[0]);
  endfunction

  // Value (0..9) of a BCD-5211 digit.
  function automatic logic [3:0] val_5211(input digit_t c);
    return 4'(c[3]) * 4'd5 + 4'(c[2]) * 4'd2 + 4'(c[1]) + 4'(c[0]);
  endfunction

  // Reduced BCD-4221 pattern of a value 0..9 (also used to recode BCD-8421).
  function automatic digit_t to_4221(input logic [3:0] v);
    case (v)
      4'd0: return 4'b0000;
      4'd1: return 4'b0001;
      4'd2: return 4'b0100;
      4'd3: return 4'b0101;
      4'd4: return 4'b0110;
      4'd5: return 4'b1001;
      4'd6: return 4'b1010;
      4'd7: return 4'b1011;
      4'd8: return 4'b1110;
      default: return 4'b1111;
    endcase
  endfunction

  // BCD-5211 pattern of a value 0..9.
  function automatic digit_t to_5211(input logic [3:0] v);
    case (v)
      4'd0: return 4'b0000;
      4'd1: return 4'b0001;
      4'd2: return 4'b0100;
      4'd3: return 4'b0101;
      4'd4: return 4'b0111;
      4'd5: return 4'b1000;
      4'd6: return 4'b1001;
      4'd7: return 4'b1100;
      4'd8: return 4'b1101;
      default: return 4'b1111;
    endcase
  endfunction

  // Value (0..9) of a BCD-5421 digit.
  function automatic logic [3:0] val_5421(input digit_t c);
    return 4'(c[3]) * 4'd5 + 4'(c[2]) * 4'd4 + 4'(c[1]) * 4'd2 + 4'(c[0]);
  endfunction

  // BCD-5421 pattern of a value 0..9: the 5 bit is set for 5..9 and the
  // remaining three bits hold the rest in binary.
  function automatic digit_t to_5421(input logic [3:0] v);
    if (v >= 4'd5) return {1'b1, 3'(v - 4'd5)};
    else           return {1'b0, v[2:0]};
  endfunction

endpackage
