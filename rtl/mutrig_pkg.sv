// mutrig_pkg: types and constants shared by the MuTRiG digital readout.
//
// The chip has 32 SiPM channels in four groups of eight. Each hit is time
// stamped by a TDC with a 15-bit coarse counter (one bin per 640 MHz VCO
// period) and a 5-bit fine code (one of the 32 VCO states, about 50 ps).
// A full event carries the time stamp of the timing-trigger rising edge and
// of the energy-trigger falling edge; the short event (27 bits) carries only
// the timing stamp and a one-bit energy flag. The channel count, the 15-bit
// coarse counter, the 32 fine states, the 27-bit short event and the 16-bit
// CRC follow the chip description. The exact field order, the two "bad hit"
// bits that complete the 27-bit and 48-bit words, the 8b/10b control
// characters used for framing and the configuration layout are this
// design's own choices.
package mutrig_pkg;

  localparam int unsigned N_CHANNELS      = 32;
  localparam int unsigned N_GROUPS        = 4;
  localparam int unsigned CH_PER_GROUP    = N_CHANNELS / N_GROUPS;
  localparam int unsigned CH_W            = $clog2(N_CHANNELS);
  localparam int unsigned CC_W            = 15;   // coarse counter (LFSR)
  localparam int unsigned FINE_W          = 5;    // 32 VCO states
  localparam int unsigned VCO_STAGES      = 16;
  localparam int unsigned EVENT_W         = 48;   // full event
  localparam int unsigned SHORT_EVENT_W   = 27;   // short event
  localparam int unsigned EVCNT_W         = 12;   // per-channel rate counter
  localparam int unsigned VAL_TICK_CYCLES = 10;   // address-table period
  localparam int unsigned WIN_OFFSET_MAX  = 16;   // 16 x 10 cycles = 1.25 us
  localparam int unsigned WIN_WIDTH_MAX   = 32;   // 32 x 10 cycles = 2.5 us

  // One TDC time stamp.
  typedef struct packed {
    logic              badhit;  // stamp may have been overwritten
    logic [CC_W-1:0]   cc;      // coarse counter (LFSR state)
    logic [FINE_W-1:0] fine;    // VCO state, binary 0..31
  } stamp_t;

  // Full event, 48 bits, MSB first on the link.
  typedef struct packed {
    logic [CH_W-1:0] channel;
    stamp_t          t;       // rising edge of the timing trigger
    stamp_t          e;       // falling edge of the energy trigger
    logic            e_flag;  // energy threshold was crossed
  } event_t;

  // Short event, 27 bits: time of arrival and the energy flag only.
  typedef struct packed {
    logic [CH_W-1:0] channel;
    stamp_t          t;
    logic            e_flag;
  } short_event_t;

  function automatic short_event_t to_short(event_t ev);
    short_event_t s;
    s.channel = ev.channel;
    s.t       = ev.t;
    s.e_flag  = ev.e_flag;
    return s;
  endfunction

  // Per-channel configuration word written over SPI.
  typedef struct packed {
    logic        enable;  // channel produces events
    logic [14:0] dac;     // analog settings (thresholds, bias), opaque here
  } ch_cfg_t;

  // Global configuration written over SPI.
  typedef struct packed {
    logic [9:0] spare;
    logic [7:0] e_timeout;   // sys cycles to wait for the energy edge
    logic       prbs_mode;   // frames carry PRBS words instead of events
    logic [5:0] win_width;   // matching window width, units of 10 cycles
    logic [4:0] win_offset;  // matching window offset, units of 10 cycles
    logic       ext_val_en;  // external validation in the L1 FIFOs
    logic       short_mode;  // 27-bit events on the link
  } glb_cfg_t;

  localparam int unsigned CH_CFG_W  = $bits(ch_cfg_t);
  localparam int unsigned GLB_CFG_W = $bits(glb_cfg_t);
  localparam int unsigned CFG_W     = N_CHANNELS * CH_CFG_W + GLB_CFG_W;

  // 8b/10b control characters (value of the 8-bit input with K=1).
  localparam logic [7:0] K28_0 = 8'h1C;  // start of frame
  localparam logic [7:0] K28_4 = 8'h9C;  // end of frame
  localparam logic [7:0] K28_5 = 8'hBC;  // comma, sent between frames

  // CRC-16, polynomial x^16 + x^12 + x^5 + 1, one byte, MSB first.
  function automatic logic [15:0] crc16_byte(logic [15:0] crc, logic [7:0] d);
    logic [15:0] c;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      if (c[15] ^ d[i]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else              c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

endpackage
