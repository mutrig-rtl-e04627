// tdc_channel: per-channel TDC latch. At every rising edge of the combined
// hit signal it stores the state of the VCO and the coarse counter.
//
// The 16 VCO stage outputs are converted to a 5-bit fine code (position in
// the 32-state Johnson sequence) and stored with the 15-bit coarse counter
// value. Two stamp banks are written alternately and a 2-bit Gray-coded edge
// count tells the SYS_CLK side, after synchronisation, how many stamps are
// new and which bank holds each: a timing stamp and the energy stamp that
// follows it a few nanoseconds later are both kept. The latching on rising
// edges follows the chip description; the two banks and the Gray count are
// this design's choice. The flip-flops here are clocked by the hit signal
// itself; the outputs are asynchronous to SYS_CLK and are read only after the
// Gray count has been synchronised (see event_gen).
module tdc_channel
  import mutrig_pkg::*;
#(
  parameter int unsigned STAGES = VCO_STAGES
) (
  input  logic              hit,
  input  logic              rst_n,
  input  logic [STAGES-1:0] vco_phase,
  input  logic [CC_W-1:0]   cc,
  output logic [1:0]        edge_gray,
  output stamp_t            bank [2]
);
  // Johnson code to binary: k ones from bit 0 means state k (0..16); k
  // zeros from bit 0 followed by ones means state 16 + k.
  function automatic logic [FINE_W-1:0] fine_code(logic [STAGES-1:0] ph);
    int unsigned ones;
    ones = 0;
    for (int i = 0; i < STAGES; i++) ones += int'(ph[i]);
    if (ph[0] || ones == 0) return FINE_W'(ones);
    else                    return FINE_W'(2 * STAGES - ones);
  endfunction

  logic [1:0] cnt;  // binary edge count

  always_ff @(posedge hit or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      bank[0] <= '0;
      bank[1] <= '0;
    end else begin
      bank[cnt[0]] <= '{badhit: 1'b0, cc: cc, fine: fine_code(vco_phase)};
      cnt          <= cnt + 2'd1;
    end
  end

  assign edge_gray = cnt ^ (cnt >> 1);
endmodule
