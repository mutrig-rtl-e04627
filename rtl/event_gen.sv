// event_gen: builds the events of one channel from its TDC time stamps.
//
// The Gray-coded edge count of the TDC is synchronised to SYS_CLK with two
// flip-flops. Each new stamp is taken from the bank its count selects, one
// per cycle. The first stamp after idle is the time of arrival (rising edge
// of the timing trigger). If a second stamp follows within e_timeout cycles
// it is the falling edge of the energy trigger: the event carries both and
// e_flag = 1. Otherwise the energy threshold was not crossed and the event
// is sent with e_flag = 0 and a zero energy stamp. A stamp is marked badhit
// when three or more unread stamps had piled up, since one of the two banks
// was then overwritten. Pairing the two stamps into one event follows the
// chip description; the timeout, the badhit rule and the single output
// register (an event that finds it full is lost, and not counted) are this
// design's choices.
//
// Interface: valid/ready handshake towards the channel arbiter; the event
// is held until accepted. hit_pulse is high for one cycle per event built,
// for the per-channel rate counter. A disabled channel consumes its stamps
// and builds no events. Timing: an event appears two to four cycles after
// its last stamp is latched, or e_timeout cycles after the first.
module event_gen
  import mutrig_pkg::*;
#(
  parameter logic [CH_W-1:0] CHANNEL = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [7:0] e_timeout,
  input  logic [1:0] edge_gray,   // asynchronous, from tdc_channel
  input  stamp_t     bank [2],    // stable while its count is unread
  output logic       ev_valid,
  input  logic       ev_ready,
  output event_t     ev,
  output logic       hit_pulse
);
  logic [1:0] g_s1, g_s2;
  logic [1:0] seen;        // binary count of stamps already taken
  logic [1:0] wr_bin, diff;
  logic       have_t;      // timing stamp held, waiting for energy
  stamp_t     t_stamp;
  logic [7:0] timer;

  logic       new_stamp, build, build_e;
  stamp_t     cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_s1 <= '0;
      g_s2 <= '0;
    end else begin
      g_s1 <= edge_gray;
      g_s2 <= g_s1;
    end
  end

  always_comb begin
    wr_bin    = {g_s2[1], g_s2[1] ^ g_s2[0]};
    diff      = wr_bin - seen;
    new_stamp = (diff != 2'd0);
    cur       = bank[seen[0]];
    cur.badhit = (diff == 2'd3);
    build     = enable && have_t && (new_stamp || timer == e_timeout);
    build_e   = new_stamp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen      <= '0;
      have_t    <= 1'b0;
      t_stamp   <= '0;
      timer     <= '0;
      ev_valid  <= 1'b0;
      ev        <= '0;
      hit_pulse <= 1'b0;
    end else begin
      hit_pulse <= 1'b0;
      if (ev_valid && ev_ready) ev_valid <= 1'b0;
      if (new_stamp) seen <= seen + 2'd1;
      timer <= timer + 8'd1;

      if (!enable) begin
        have_t <= 1'b0;
      end else if (build) begin
        // second stamp (energy) or timeout
        have_t    <= 1'b0;
        hit_pulse <= 1'b1;
        if (!ev_valid || ev_ready) begin
          ev_valid  <= 1'b1;
          ev.channel <= CHANNEL;
          ev.t       <= t_stamp;
          ev.e       <= build_e ? cur : '0;
          ev.e_flag  <= build_e;
        end
      end else if (new_stamp) begin
        have_t  <= 1'b1;
        t_stamp <= cur;
        timer   <= 8'd1;
      end
    end
  end
endmodule
