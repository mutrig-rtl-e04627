// tb_8b10b_pkg: 8b/10b decoder for the testbenches, written from the
// decoding side of the standard code tables (each 6-bit and 4-bit group in
// both polarities), independent of the encoder's construction. decode()
// returns {legal code, control flag, byte}.
// Code bit 0 is bit a, the first bit on the line.
package tb_8b10b_pkg;

  function automatic int dec6(logic [5:0] c);   // c = abcdei, a in MSB
    case (c)
      6'b100111, 6'b011000: return 0;   6'b011101, 6'b100010: return 1;
      6'b101101, 6'b010010: return 2;   6'b110001:            return 3;
      6'b110101, 6'b001010: return 4;   6'b101001:            return 5;
      6'b011001:            return 6;   6'b111000, 6'b000111: return 7;
      6'b111001, 6'b000110: return 8;   6'b100101:            return 9;
      6'b010101:            return 10;  6'b110100:            return 11;
      6'b001101:            return 12;  6'b101100:            return 13;
      6'b011100:            return 14;  6'b010111, 6'b101000: return 15;
      6'b011011, 6'b100100: return 16;  6'b100011:            return 17;
      6'b010011:            return 18;  6'b110010:            return 19;
      6'b001011:            return 20;  6'b101010:            return 21;
      6'b011010:            return 22;  6'b111010, 6'b000101: return 23;
      6'b110011, 6'b001100: return 24;  6'b100110:            return 25;
      6'b010110:            return 26;  6'b110110, 6'b001001: return 27;
      6'b001110:            return 28;  6'b101110, 6'b010001: return 29;
      6'b011110, 6'b100001: return 30;  6'b101011, 6'b010100: return 31;
      6'b001111, 6'b110000: return 128 + 28;   // K28
      default: return -1;
    endcase
  endfunction

  function automatic int dec4(logic [3:0] c);   // c = fghj, f in MSB
    case (c)
      4'b1011, 4'b0100: return 0;  4'b1001: return 1;  4'b0101: return 2;
      4'b1100, 4'b0011: return 3;  4'b1101, 4'b0010: return 4;
      4'b1010: return 5;  4'b0110: return 6;
      4'b1110, 4'b0001, 4'b0111, 4'b1000: return 7;
      default: return -1;
    endcase
  endfunction

  function automatic logic [9:0] decode(logic [9:0] code);
    logic [5:0] c6;
    logic [3:0] c4;
    int x, y;
    logic [9:0] r;   // {ok, k, data}
    for (int i = 0; i < 6; i++) c6[5-i] = code[i];
    for (int i = 0; i < 4; i++) c4[3-i] = code[6+i];
    x = dec6(c6);
    r = '0;
    if (x == 128 + 28) begin
      // K28.y: the 4-bit group follows the polarity of the 6-bit group
      logic [3:0] tab [8];
      if (c6 == 6'b001111) tab = '{4'b0100, 4'b1001, 4'b0101, 4'b0011, 4'b0010, 4'b1010, 4'b0110, 4'b1000};
      else                 tab = '{4'b1011, 4'b0110, 4'b1010, 4'b1100, 4'b1101, 4'b0101, 4'b1001, 4'b0111};
      for (int j = 0; j < 8; j++) if (tab[j] == c4) begin
        r = {1'b1, 1'b1, 3'(j), 5'd28};
      end
      return r;
    end
    y = dec4(c4);
    if (x < 0 || y < 0) return r;
    r = {1'b1, 1'b0, 3'(y), 5'(x)};
    // K23.7, K27.7, K29.7, K30.7 use the A7 group where data uses P7
    if (y == 7 && (x == 23 || x == 27 || x == 29 || x == 30) &&
        ((c6[0] == 1'b0 && c4 == 4'b1000) || (c6[0] == 1'b1 && c4 == 4'b0111)))
      r[8] = 1'b1;
    return r;
  endfunction

  function automatic int disparity(logic [9:0] code);
    int ones = 0;
    for (int i = 0; i < 10; i++) ones += int'(code[i]);
    return 2 * ones - 10;
  endfunction

endpackage
