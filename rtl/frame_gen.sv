// frame_gen: packs events into frames for the serial link, one byte per
// SYS_CLK cycle, with a CRC-16 at the end of each frame.
//
// Frame layout (bytes, k = control character):
//   K28.0 (k)            start of frame
//   frame number [15:8]  16-bit count of frames sent
//   frame number [7:0]
//   mode                 bit 7 short events, bit 6 PRBS data
//   n                    number of events in the frame, 0..MAX_EVENTS
//   payload              n events, bit-packed MSB first, last byte padded
//   CRC [15:8], CRC[7:0] over frame number .. last payload byte
//   K28.4 (k)            end of frame
//   K28.5 (k)            comma, one between frames
// Frames follow each other without pause, empty ones included, so the
// receiver sees a frame number every few cycles even without hits.
//
// Payload: full events are 48 bits (6 bytes); in short mode only the
// 27-bit short event (channel, time stamp, energy flag) is sent and events
// are packed back to back across byte boundaries, so a frame of n short
// events takes ceil(27 n / 8) bytes. The event count of a frame is the L2
// FIFO fill level when the frame starts (capped at MAX_EVENTS), so the
// payload never waits for data. In PRBS mode the payload words come from
// prbs_gen instead of the FIFO, MAX_EVENTS of them per frame.
//
// Frames with a 16-bit CRC at the end, the 27-bit short event and the PRBS
// source follow the chip description; the header, the control characters,
// the bit packing and continuous framing are this design's choices.
// Outputs byte_o/k_o are registered and change every cycle.
module frame_gen
  import mutrig_pkg::*;
#(
  parameter int unsigned MAX_EVENTS = 255,
  parameter int unsigned CNT_W      = 9
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  short_mode,
  input  logic                  prbs_mode,
  // event source: show-ahead FIFO
  input  logic                  ev_valid,
  output logic                  ev_ready,
  input  event_t                ev,
  input  logic [CNT_W-1:0]      ev_count,
  // PRBS source
  input  logic [EVENT_W-1:0]    prbs_data,
  output logic                  prbs_next,
  // to the 8b/10b encoder
  output logic [7:0]            byte_o,
  output logic                  k_o,
  output logic                  frame_end  // one cycle, with the K28.4
);
  typedef enum logic [3:0] {
    S_COMMA, S_SOF, S_FID_H, S_FID_L, S_MODE, S_CNT, S_DATA, S_CRC_H, S_CRC_L, S_EOF
  } fstate_t;

  fstate_t     state, state_n;
  logic [15:0] fid;
  logic [7:0]  n_ev, ev_left, ev_left_n;
  logic        short_q, prbs_q;
  logic [63:0] acc, acc_n;
  logic [6:0]  acc_bits, acc_bits_n;
  logic [7:0]  byte_n;
  logic        k_n, crc_en, crc_clr, pop;
  logic [15:0] crc;
  logic [63:0] word;
  logic [6:0]  word_bits;
  logic [CNT_W-1:0] take;

  assign take = (ev_count > CNT_W'(MAX_EVENTS)) ? CNT_W'(MAX_EVENTS) : ev_count;

  always_comb begin
    word      = short_q ? {to_short(prbs_q ? event_t'(prbs_data) : ev), 37'b0}
                        : {(prbs_q ? prbs_data : EVENT_W'(ev)), 16'b0};
    word_bits = short_q ? 7'(SHORT_EVENT_W) : 7'(EVENT_W);
  end

  always_comb begin
    state_n    = state;
    byte_n     = 8'h00;
    k_n        = 1'b0;
    crc_en     = 1'b0;
    crc_clr    = 1'b0;
    pop        = 1'b0;
    acc_n      = acc;
    acc_bits_n = acc_bits;
    ev_left_n  = ev_left;
    unique case (state)
      S_COMMA: begin byte_n = K28_5; k_n = 1'b1; state_n = S_SOF; end
      S_SOF:   begin byte_n = K28_0; k_n = 1'b1; crc_clr = 1'b1; state_n = S_FID_H; end
      S_FID_H: begin byte_n = fid[15:8]; crc_en = 1'b1; state_n = S_FID_L; end
      S_FID_L: begin byte_n = fid[7:0];  crc_en = 1'b1; state_n = S_MODE; end
      S_MODE:  begin byte_n = {short_q, prbs_q, 6'b0}; crc_en = 1'b1; state_n = S_CNT; end
      S_CNT:   begin
        byte_n = n_ev; crc_en = 1'b1;
        state_n = (n_ev == 8'd0) ? S_CRC_H : S_DATA;
      end
      S_DATA: begin
        crc_en = 1'b1;
        if (acc_bits >= 7'd8) begin
          byte_n     = acc[63:56];
          acc_n      = acc << 8;
          acc_bits_n = acc_bits - 7'd8;
        end else if (ev_left != 8'd0) begin
          automatic logic [63:0] merged = acc | (word >> acc_bits);
          pop        = 1'b1;
          ev_left_n  = ev_left - 8'd1;
          byte_n     = merged[63:56];
          acc_n      = merged << 8;
          acc_bits_n = acc_bits + word_bits - 7'd8;
        end else begin
          // flush the last, zero-padded byte
          byte_n     = acc[63:56];
          acc_n      = '0;
          acc_bits_n = '0;
        end
        if (acc_bits_n == '0 && ev_left_n == '0) state_n = S_CRC_H;
      end
      S_CRC_H: begin byte_n = crc[15:8]; state_n = S_CRC_L; end
      S_CRC_L: begin byte_n = crc[7:0];  state_n = S_EOF; end
      S_EOF:   begin byte_n = K28_4; k_n = 1'b1; state_n = S_COMMA; end
      default: state_n = S_COMMA;
    endcase
  end

  assign ev_ready  = pop && !prbs_q;
  assign prbs_next = pop &&  prbs_q;

  crc16 u_crc (
    .clk, .rst_n, .clear(crc_clr), .en(crc_en), .data(byte_n), .crc
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_COMMA;
      fid       <= '0;
      n_ev      <= '0;
      ev_left   <= '0;
      short_q   <= 1'b0;
      prbs_q    <= 1'b0;
      acc       <= '0;
      acc_bits  <= '0;
      byte_o    <= K28_5;
      k_o       <= 1'b1;
      frame_end <= 1'b0;
    end else begin
      state     <= state_n;
      byte_o    <= byte_n;
      k_o       <= k_n;
      acc       <= acc_n;
      acc_bits  <= acc_bits_n;
      ev_left   <= ev_left_n;
      frame_end <= (state == S_EOF);
      if (state == S_SOF) begin
        // modes and the event count are fixed for the whole frame
        short_q <= short_mode;
        prbs_q  <= prbs_mode;
        n_ev    <= prbs_mode ? 8'(MAX_EVENTS) : 8'(take);
        ev_left <= prbs_mode ? 8'(MAX_EVENTS) : 8'(take);
      end
      if (state == S_EOF) fid <= fid + 16'd1;
    end
  end

  // Events are only popped while the FIFO holds them.
  a_no_empty_pop : assert property (@(posedge clk) disable iff (!rst_n)
    ev_ready |-> ev_valid);
endmodule
