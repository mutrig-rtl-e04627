// clk_divider: derives the 128 MHz system clock and the serializer load
// strobe BYTE_RD from the 640 MHz serial clock.
//
// A counter runs 0..DIV-1 on the rising edge of ser_clk. sys_clk is high for
// counts 0 and 1 and for the first half of count 2 (a falling-edge flip-flop
// stretches it), which gives a 50 % duty cycle for DIV = 5; its rising edge
// coincides with the ser_clk rising edge that enters count 0. byte_rd is
// registered and high during count 3, so the serializer loads at the rising
// edge that enters count 4, three serial clock cycles after the SYS_CLK edge
// that updated the code group. Division by five (one 10-bit code group per
// SYS_CLK cycle at 1.28 Gbps, loaded every 5 serial clock cycles) follows
// the chip description; the phase relation is this design's choice.
module clk_divider #(
  parameter int unsigned DIV = 5
) (
  input  logic ser_clk,
  input  logic rst_n,
  output logic sys_clk,
  output logic byte_rd
);
  localparam int unsigned CW = $clog2(DIV);

  logic [CW-1:0] cnt;
  logic          hi_pos, hi_neg;

  always_ff @(posedge ser_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= CW'(DIV - 1);
      hi_pos  <= 1'b0;
      byte_rd <= 1'b0;
    end else begin
      automatic logic [CW-1:0] nxt = (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      cnt     <= nxt;
      hi_pos  <= (int'(nxt) < int'(DIV / 2));
      byte_rd <= (int'(nxt) == int'(DIV / 2) + 1);
    end
  end

  always_ff @(negedge ser_clk or negedge rst_n) begin
    if (!rst_n) hi_neg <= 1'b0;
    else        hi_neg <= hi_pos;
  end

  assign sys_clk = hi_pos | hi_neg;
endmodule
