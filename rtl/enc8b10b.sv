// enc8b10b: 8b/10b line encoder with running disparity, one code group per
// SYS_CLK cycle.
//
// The byte HGF EDCBA is coded as a 6-bit group abcdei from EDCBA and a
// 4-bit group fghj from HGF. Each sub-block is either balanced or has a
// disparity of +-2; unbalanced groups are sent in the polarity that brings
// the running disparity back towards zero, which keeps the line DC-free and
// bounds run lengths to five. Control characters (k = 1) K28.0-K28.7 and
// K23.7, K27.7, K29.7, K30.7 are supported; K28.5 carries the comma that the
// receiver aligns on. The code itself is the standard Widmer-Franaszek
// 8b/10b code named by the chip description; the running disparity starts
// negative after reset. Output: code[0] is bit a, the first bit sent, and
// code[9] is bit j. The output is registered (one cycle latency).
module enc8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,      // encode this cycle
  input  logic [7:0] data,
  input  logic       k,
  output logic [9:0] code,
  output logic       rd       // running disparity after code, 1 = positive
);
  // 6-bit groups abcdei for running disparity negative, a in the MSB.
  function automatic logic [5:0] tab6(logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 4-bit groups fghj for running disparity negative, f in the MSB;
  // index 7 is the primary P7, index 8 the alternate A7.
  function automatic logic [3:0] tab4(int unsigned y);
    case (y)
      0: return 4'b1011;  1: return 4'b1001;  2: return 4'b0101;
      3: return 4'b1100;  4: return 4'b1101;  5: return 4'b1010;
      6: return 4'b0110;  7: return 4'b1110;  default: return 4'b0111;
    endcase
  endfunction

  function automatic int disp(logic [5:0] v, int unsigned n);
    int ones;
    ones = 0;
    for (int unsigned i = 0; i < n; i++) ones += int'(v[i]);
    return 2 * ones - int'(n);
  endfunction

  logic [5:0] c6;
  logic [3:0] c4;
  logic       rd_mid, rd_end;

  always_comb begin
    automatic logic [4:0] x = data[4:0];
    automatic int unsigned y = int'(data[7:5]);
    automatic logic k28 = k && (x == 5'd28);
    automatic logic alt7;

    // 6-bit sub-block
    c6 = k28 ? 6'b001111 : tab6(x);
    if (rd && (disp(c6, 6) != 0 || (!k28 && x == 5'd7))) c6 = ~c6;
    rd_mid = (disp(c6, 6) != 0) ? ~rd : rd;

    // 4-bit sub-block
    alt7 = k || (!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20))
              || ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14));
    c4 = tab4((y == 7 && alt7) ? 8 : y);
    if (k28 && (y == 1 || y == 2 || y == 5 || y == 6)) begin
      if (!rd_mid) c4 = ~c4;
    end else if (rd_mid && (disp({2'b00, c4}, 4) != 0 || y == 3)) begin
      c4 = ~c4;
    end
    rd_end = (disp({2'b00, c4}, 4) != 0) ? ~rd_mid : rd_mid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd   <= 1'b0;
      code <= '0;
    end else if (en) begin
      rd <= rd_end;
      for (int i = 0; i < 6; i++) code[i]     <= c6[5-i];
      for (int i = 0; i < 4; i++) code[6 + i] <= c4[3-i];
    end
  end
endmodule
