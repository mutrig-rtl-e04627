// lvds_testchip: digital mock-up of the gigabit link test chip. It sends
// frames of test data over the same link logic as the readout chip, so that
// the serial line can be measured on its own (eye diagram).
//
// Data source: a PRBS-31 generator or a configured 48-bit pattern, chosen
// by sel_prbs. Both feed the frame generator in its PRBS mode, so every
// frame carries MAX_EVENTS words of test data in the normal frame format
// (K28.5 comma, K28.0, frame number, mode byte with bit 6 set, count,
// payload, CRC-16, K28.4). The frame bytes are 8b/10b encoded and sent by
// the double data rate serializer, one bit on each edge of ser_clk.
//
// Interface: ser_clk is the clock taken in by the LVDS receiver (640 MHz
// for 1.28 Gbps; the test chip was run up to 750 MHz, 1.5 Gbps);
// ser_data goes to the LVDS transmitter. The frame logic runs on ser_clk /
// 5 (sys_clk, brought out). pattern and sel_prbs are static settings.
//
// The chain PRBS / configured pattern -> frame generator -> 8b/10b ->
// serializer follows the test chip description. The selection between the
// two sources, the pattern width and reusing the readout chip's frame
// format are this design's choices.
module lvds_testchip
  import mutrig_pkg::*;
#(
  parameter int unsigned MAX_EVENTS = 255
) (
  input  logic               ser_clk,
  input  logic               rst_n,
  input  logic               sel_prbs,   // 1: PRBS words, 0: the pattern
  input  logic [EVENT_W-1:0] pattern,
  output logic               sys_clk,
  output logic               ser_data
);
  logic               byte_rd;
  logic [EVENT_W-1:0] prbs_word, word;
  logic               next;
  logic [7:0]         fbyte;
  logic               fk, frame_end, ev_ready;
  logic [9:0]         code;
  logic               rd;

  clk_divider #(.DIV(5)) u_div (.ser_clk, .rst_n, .sys_clk, .byte_rd);

  prbs_gen #(.W(EVENT_W)) u_prbs (.clk(sys_clk), .rst_n, .next(next && sel_prbs), .data(prbs_word));

  assign word = sel_prbs ? prbs_word : pattern;

  frame_gen #(.MAX_EVENTS(MAX_EVENTS), .CNT_W(9)) u_frame (
    .clk(sys_clk), .rst_n, .short_mode(1'b0), .prbs_mode(1'b1),
    .ev_valid(1'b0), .ev_ready, .ev('0), .ev_count('0),
    .prbs_data(word), .prbs_next(next), .byte_o(fbyte), .k_o(fk), .frame_end
  );

  enc8b10b u_enc (.clk(sys_clk), .rst_n, .en(1'b1), .data(fbyte), .k(fk), .code, .rd);

  serializer u_ser (.ser_clk, .rst_n, .byte_rd, .data(code), .ser_data);
endmodule
