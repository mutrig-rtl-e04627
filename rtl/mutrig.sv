// mutrig: digital part of the MuTRiG SiPM readout chip, 32 channels.
//
// Data path, per SYS_CLK (128 MHz) cycle:
//   hit_logic    timing and energy trigger of a channel -> one hit signal
//   tdc_channel  latches VCO state (fine, ~50 ps) and LFSR coarse counter
//                at each rising edge of the hit signal
//   event_gen    pairs the timing and energy stamps into an event
//   channel_arbiter (one per 8 channels) -> l1_fifo (with optional
//                external validation by ext_trig)
//   group_arbiter (4 groups) -> l2_fifo -> frame_gen (CRC-16, PRBS mode)
//   enc8b10b -> serializer (DDR, 640 MHz clock, 1.28 Gbps) -> ser_data
// Side blocks: pll_vco and coarse_counter form the common time base;
// clk_divider makes SYS_CLK and BYTE_RD from SER_CLK; event_counter counts
// events per channel; spi_slave and control_reg load the configuration and
// read the counters.
//
// The analog front end (input stage and the two discriminators per
// channel) and the LVDS transmitter are not part of this model: the
// discriminator outputs t_trig/e_trig are inputs and ser_data is the bit
// fed to the LVDS driver. pll_vco is a behavioural model. The block
// structure, the grouping, the clock frequencies and the widths follow the
// chip description; the protocols between blocks are this design's (see
// each module). Clocks: pll_ref_clk and ser_clk 640 MHz, sys_clk = ser_clk
// / 5 (output for observation), sclk up to 20 MHz. rst_n is an
// asynchronous reset for all domains.
//
// The mock-up circuit of the link test chip (lvds_testchip: PRBS or a
// configured pattern sent in frames over the same link logic) stands beside
// the readout chip with its own tc_* pins; it shares nothing with it.
module mutrig
  import mutrig_pkg::*;
#(
  parameter int unsigned L1_DEPTH   = 128,
  parameter int unsigned L2_DEPTH   = 256,
  parameter int unsigned MAX_EVENTS = 255
) (
  input  logic                  pll_ref_clk,
  input  logic                  ser_clk,
  input  logic                  rst_n,
  input  logic [N_CHANNELS-1:0] t_trig,
  input  logic [N_CHANNELS-1:0] e_trig,
  input  logic                  ext_trig,
  input  logic                  sclk,
  input  logic                  cs_n,
  input  logic                  sdi,
  output logic                  sdo,
  output logic                  ser_data,
  output logic                  sys_clk,
  output logic [14:0]           ch_dac [N_CHANNELS],
  output logic [N_GROUPS-1:0]   trig_missed,
  // link test chip mock-up, a separate circuit with its own pins
  input  logic                  tc_ser_clk,
  input  logic                  tc_rst_n,
  input  logic                  tc_sel_prbs,
  input  logic [EVENT_W-1:0]    tc_pattern,
  output logic                  tc_sys_clk,
  output logic                  tc_ser_data
);
  localparam int unsigned CNT_W = $clog2(L2_DEPTH) + 1;

  // ---------------- time base ----------------
  logic [VCO_STAGES-1:0] vco_phase;
  logic                  vco_clk;
  logic [CC_W-1:0]       cc;

  pll_vco #(.STAGES(VCO_STAGES)) u_pll (
    .ref_clk(pll_ref_clk), .vco_phase, .vco_clk
  );
  coarse_counter #(.CC_W(CC_W)) u_cc (.vco_clk, .rst_n, .cc);

  // ---------------- clocks ----------------
  logic byte_rd;
  clk_divider #(.DIV(5)) u_div (.ser_clk, .rst_n, .sys_clk, .byte_rd);

  // ---------------- configuration ----------------
  logic [CFG_W-1:0] spi_shreg, spi_rd;
  ch_cfg_t          ch_cfg [N_CHANNELS];
  glb_cfg_t         glb;

  control_reg u_ctrl (.cs_n, .rst_n, .shreg(spi_shreg), .ch_cfg, .glb_cfg(glb));

  for (genvar i = 0; i < N_CHANNELS; i++) begin : g_dac
    assign ch_dac[i] = ch_cfg[i].dac;
  end

  // ---------------- channels ----------------
  logic   ev_valid [N_GROUPS][CH_PER_GROUP];
  logic   ev_ready [N_GROUPS][CH_PER_GROUP];
  event_t ev       [N_GROUPS][CH_PER_GROUP];
  logic [N_CHANNELS-1:0] hit_pulse;

  for (genvar i = 0; i < N_CHANNELS; i++) begin : g_ch
    localparam int unsigned G = i / CH_PER_GROUP;
    localparam int unsigned C = i % CH_PER_GROUP;
    logic       hit;
    logic [1:0] edge_gray;
    stamp_t     bank [2];

    hit_logic u_hit (.t_trig(t_trig[i]), .e_trig(e_trig[i]), .hit);
    tdc_channel u_tdc (.hit, .rst_n, .vco_phase, .cc, .edge_gray, .bank);
    event_gen #(.CHANNEL(CH_W'(i))) u_eg (
      .clk(sys_clk), .rst_n, .enable(ch_cfg[i].enable), .e_timeout(glb.e_timeout),
      .edge_gray, .bank,
      .ev_valid(ev_valid[G][C]), .ev_ready(ev_ready[G][C]), .ev(ev[G][C]),
      .hit_pulse(hit_pulse[i])
    );
  end

  // ---------------- groups: channel arbiter + L1 FIFO ----------------
  logic   ca_valid [N_GROUPS], ca_ready [N_GROUPS];
  event_t ca_ev    [N_GROUPS];
  logic   l1_valid [N_GROUPS], l1_ready [N_GROUPS];
  event_t l1_ev    [N_GROUPS];

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_grp
    logic win_busy;
    channel_arbiter #(.N(CH_PER_GROUP)) u_carb (
      .clk(sys_clk), .rst_n,
      .in_valid(ev_valid[g]), .in_ready(ev_ready[g]), .in_ev(ev[g]),
      .out_valid(ca_valid[g]), .out_ready(ca_ready[g]), .out_ev(ca_ev[g])
    );
    l1_fifo #(.DEPTH(L1_DEPTH)) u_l1 (
      .clk(sys_clk), .rst_n,
      .ext_val_en(glb.ext_val_en), .win_offset(glb.win_offset), .win_width(glb.win_width),
      .ext_trig,
      .wr_valid(ca_valid[g]), .wr_ready(ca_ready[g]), .wr_ev(ca_ev[g]),
      .rd_valid(l1_valid[g]), .rd_ready(l1_ready[g]), .rd_ev(l1_ev[g]),
      .win_busy, .trig_missed(trig_missed[g])
    );
  end

  // ---------------- group arbiter + L2 FIFO ----------------
  logic             ga_valid, ga_ready;
  event_t           ga_ev;
  logic             l2_valid, l2_ready;
  logic [EVENT_W-1:0] l2_data;
  logic [CNT_W-1:0] l2_count;

  group_arbiter #(.N(N_GROUPS)) u_garb (
    .clk(sys_clk), .rst_n,
    .in_valid(l1_valid), .in_ready(l1_ready), .in_ev(l1_ev),
    .out_valid(ga_valid), .out_ready(ga_ready), .out_ev(ga_ev)
  );

  l2_fifo #(.W(EVENT_W), .DEPTH(L2_DEPTH)) u_l2 (
    .clk(sys_clk), .rst_n,
    .wr_valid(ga_valid), .wr_ready(ga_ready), .wr_data(ga_ev),
    .rd_valid(l2_valid), .rd_ready(l2_ready), .rd_data(l2_data), .count(l2_count)
  );

  // ---------------- frame generation and link ----------------
  logic [EVENT_W-1:0] prbs_data;
  logic               prbs_next;
  logic [7:0]         fbyte;
  logic               fk, frame_end;
  logic [9:0]         code;
  logic               rd;

  prbs_gen #(.W(EVENT_W)) u_prbs (.clk(sys_clk), .rst_n, .next(prbs_next), .data(prbs_data));

  frame_gen #(.MAX_EVENTS(MAX_EVENTS), .CNT_W(CNT_W)) u_frame (
    .clk(sys_clk), .rst_n, .short_mode(glb.short_mode), .prbs_mode(glb.prbs_mode),
    .ev_valid(l2_valid), .ev_ready(l2_ready), .ev(event_t'(l2_data)), .ev_count(l2_count),
    .prbs_data, .prbs_next, .byte_o(fbyte), .k_o(fk), .frame_end
  );

  enc8b10b u_enc (.clk(sys_clk), .rst_n, .en(1'b1), .data(fbyte), .k(fk), .code, .rd);

  serializer u_ser (.ser_clk, .rst_n, .byte_rd, .data(code), .ser_data);

  // ---------------- monitoring ----------------
  logic [EVCNT_W-1:0] counts [N_CHANNELS];
  logic [1:0]         cs_sync;

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) cs_sync <= 2'b11;
    else        cs_sync <= {cs_sync[0], cs_n};
  end

  event_counter #(.N(N_CHANNELS), .W(EVCNT_W)) u_cnt (
    .clk(sys_clk), .rst_n, .hit_pulse, .freeze(!cs_sync[1]), .snapshot(counts)
  );

  // counters of channel 31 first, then zeros
  always_comb begin
    spi_rd = '0;
    for (int i = 0; i < N_CHANNELS; i++)
      spi_rd[CFG_W - EVCNT_W*(N_CHANNELS - i) +: EVCNT_W] = counts[i];
  end

  spi_slave #(.L(CFG_W)) u_spi (.sclk, .cs_n, .sdi, .sdo, .rd_data(spi_rd), .shreg(spi_shreg));
  // ---------------- link test chip ----------------
  lvds_testchip #(.MAX_EVENTS(MAX_EVENTS)) u_tc (
    .ser_clk(tc_ser_clk), .rst_n(tc_rst_n), .sel_prbs(tc_sel_prbs), .pattern(tc_pattern),
    .sys_clk(tc_sys_clk), .ser_data(tc_ser_data)
  );
endmodule
