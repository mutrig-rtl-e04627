// hit_logic: merges the timing and energy discriminator outputs of one
// channel into the single signal that the channel TDC time stamps.
//
// The TDC latches on rising edges only, so the combined signal must rise at
// the two instants the chip measures: the rising edge of the timing trigger
// (time of arrival) and the falling edge of the energy trigger (end of the
// time over threshold). The combined signal is high while the timing trigger
// is high and the energy trigger is low. Because the energy threshold lies
// above the timing threshold, the energy pulse sits inside the timing pulse:
// the output rises with the timing trigger, drops while the energy trigger is
// high, and rises again when the energy trigger falls. With a small pulse
// that never reaches the energy threshold the output is the timing pulse.
// Rising edges at the two measured instants follow the chip description; the
// particular function is this design's choice. Purely combinational.
module hit_logic (
  input  logic t_trig,  // timing discriminator (low threshold)
  input  logic e_trig,  // energy discriminator (high threshold)
  output logic hit      // combined signal to the TDC
);
  assign hit = t_trig & ~e_trig;
endmodule
