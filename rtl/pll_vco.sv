// pll_vco: behavioural model (not synthesizable) of the TDC time base PLL
// and its 16-stage ring VCO.
//
// In the chip a PLL locks a 16-stage differential ring oscillator to the
// 640 MHz reference. The ring passes through 32 distinct states per period,
// so its stage outputs subdivide one coarse bin into 32 fine bins of about
// 50 ps. This model assumes the loop is locked: every rising edge of ref_clk
// restarts the ring at state 0 and the states follow every REF_PERIOD_PS/32
// picoseconds. The stage outputs form a 16-bit Johnson sequence: state k
// (k = 0..16) has the k lowest stages high, state 16 + j has the j lowest
// stages low again. vco_clk is the inverted last stage, which rises at the
// start of state 0, once per period; it drives the coarse counter, so that
// coarse * 32 + fine counts time without a step back. Lock acquisition, jitter and the analog loop
// are not modelled. Delays carry explicit picosecond units.
module pll_vco #(
  parameter int unsigned STAGES        = 16,
  parameter int unsigned REF_PERIOD_PS = 1562
) (
  input  logic              ref_clk,
  output logic [STAGES-1:0] vco_phase,
  output logic              vco_clk
);
  localparam int unsigned NSTATES = 2 * STAGES;

  int unsigned state;

  initial state = 0;

  function automatic logic [STAGES-1:0] johnson(int unsigned s);
    logic [STAGES-1:0] v;
    for (int i = 0; i < STAGES; i++)
      v[i] = (s <= STAGES) ? (i < int'(s)) : (i >= int'(s - STAGES));
    return v;
  endfunction

  // The last state ends before the next reference edge, which restarts
  // the sequence.
  always @(posedge ref_clk) begin
    state = 0;
    for (int unsigned k = 1; k < NSTATES; k++) begin
      #((REF_PERIOD_PS * k / NSTATES - REF_PERIOD_PS * (k - 1) / NSTATES) * 1ps);
      state = k;
    end
  end

  assign vco_phase = johnson(state);
  assign vco_clk   = ~vco_phase[STAGES-1];
endmodule
