// serializer: double data rate serializer that turns one 10-bit 8b/10b code
// group per SYS_CLK cycle into a 1.28 Gbps bit stream with a 640 MHz clock.
//
// Two rows of five multiplexer + flip-flop stages: the upper row holds the
// even bits 0, 2, 4, 6, 8 and is clocked on the rising edge of ser_clk, the
// lower row holds the odd bits 1, 3, 5, 7, 9 and is clocked on the falling
// edge. While byte_rd is high each row loads its five bits in parallel,
// otherwise it shifts towards its output stage. The output multiplexer
// passes the rising-edge row while ser_clk is high and the falling-edge row
// while it is low, so the line changes on both edges and bit 0 (8b/10b bit
// a) goes first: the clock runs at half the bit rate. This structure
// follows the chip description. byte_rd is sampled on the rising edge and
// must be high at one rising edge in five: the rising row loads at that
// edge, the falling row half a cycle later, and data must hold over that
// half cycle. Bit 0 appears in the high phase that starts at the load edge.
// The output multiplexer selected by the clock is intended.
module serializer (
  input  logic       ser_clk,
  input  logic       rst_n,
  input  logic       byte_rd,
  input  logic [9:0] data,
  output logic       ser_data
);
  logic [4:0] even_q, odd_q;   // index 0 is the output stage
  logic       load_odd;       // byte_rd seen at the preceding rising edge

  always_ff @(posedge ser_clk or negedge rst_n) begin
    if (!rst_n) begin
      even_q    <= '0;
      load_odd <= 1'b0;
    end else begin
      load_odd <= byte_rd;
      if (byte_rd) even_q <= {data[8], data[6], data[4], data[2], data[0]};
      else         even_q <= {1'b0, even_q[4:1]};
    end
  end

  // The falling-edge row loads half a cycle after the rising-edge row.
  always_ff @(negedge ser_clk or negedge rst_n) begin
    if (!rst_n)         odd_q <= '0;
    else if (load_odd) odd_q <= {data[9], data[7], data[5], data[3], data[1]};
    else                odd_q <= {1'b0, odd_q[4:1]};
  end

  assign ser_data = ser_clk ? even_q[0] : odd_q[0];
endmodule
