// coarse_counter: 15-bit coarse time counter of the TDC time base, built as
// a linear feedback shift register clocked by the VCO.
//
// An LFSR needs no carry chain, so it keeps up with the 640 MHz VCO; its
// states are not binary and the receiving side decodes them. The feedback
// taps x^15 + x^14 + 1 give the maximal sequence of 32767 states; the
// all-zero state never occurs. The 15-bit width and the LFSR come from the
// chip description, the polynomial and the reset seed (all ones) are this
// design's choice. One step per rising edge of vco_clk; asynchronous reset.
module coarse_counter #(
  parameter int unsigned CC_W = 15
) (
  input  logic            vco_clk,
  input  logic            rst_n,
  output logic [CC_W-1:0] cc
);
  always_ff @(posedge vco_clk or negedge rst_n) begin
    if (!rst_n) cc <= '1;
    else        cc <= {cc[CC_W-2:0], cc[CC_W-1] ^ cc[CC_W-2]};
  end
endmodule
