// tb_mutrig: end-to-end test of the whole chip model at its default sizes.
//
// The testbench drives the discriminator outputs of the 32 channels with
// hits of known timing, configures the chip and reads its event counters
// over SPI, and receives the 1.28 Gbps serial line: it samples the line in
// the middle of every half period of the 640 MHz serial clock, aligns on
// the K28.5 comma, decodes 8b/10b with its own tables, parses the frames
// (frame number, mode, count, payload, CRC, end marker) and unpacks the
// events. Every received event is matched with the hit that caused it:
// channel, energy flag, the energy time over threshold measured by the TDC
// (energy stamp - timing stamp) and the time of arrival (timing stamp
// against the injection time, which must keep a constant offset), each to
// within two 49 ps bins.
//
// Phases: full events with and without energy, several channels of one
// group hit at once (channel arbitration); short events; external
// validation with hits inside and outside the matching window and a
// trigger during an open window; PRBS frames; an overload burst on all
// channels that fills the L2 and L1 FIFOs and stalls the channel arbiters
// (frames of the maximum 255 events); SPI readout of the event counters.
// The link test chip mock-up beside the readout chip runs from its own
// 750 MHz clock and its frames are counted.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_mutrig;
  import mutrig_pkg::*;
  import tb_8b10b_pkg::*;

  localparam int HALF   = 781;               // ps, 640 MHz half period
  localparam int PER    = 2 * HALF;          // VCO period (ps)
  localparam int NBINS  = 32767 * 32;        // stamp period in fine bins

  logic pll_ref_clk = 0, ser_clk = 0, rst_n = 1;
  logic [31:0] t_trig = '0, e_trig = '0;
  logic ext_trig = 0, sclk = 0, cs_n = 1, sdi = 0;
  logic sdo, ser_data, sys_clk;
  logic [14:0] ch_dac [32];
  logic [3:0] trig_missed;
  logic tc_ser_clk = 0, tc_rst_n = 1, tc_sel_prbs = 1, tc_sys_clk, tc_ser_data;
  logic [47:0] tc_pattern = 48'h1234_5678_9ABC;

  mutrig dut (.pll_ref_clk, .ser_clk, .rst_n, .t_trig, .e_trig, .ext_trig, .sclk, .cs_n, .sdi,
              .sdo, .ser_data, .sys_clk, .ch_dac, .trig_missed,
              .tc_ser_clk, .tc_rst_n, .tc_sel_prbs, .tc_pattern, .tc_sys_clk, .tc_ser_data);

  always #(HALF * 1ps) pll_ref_clk = ~pll_ref_clk;
  initial begin
    #(300 * 1ps);
    forever #(HALF * 1ps) ser_clk = ~ser_clk;
  end

  // link test chip: clocked at 750 MHz (1.5 Gbps); its frames are checked
  // in detail by its own testbench, here only counted
  always #(667ps) tc_ser_clk = ~tc_ser_clk;
  initial begin #2ns tc_rst_n = 0; #20ns tc_rst_n = 1; end
  int tc_frames = 0, tc_toggles = 0;
  always @(posedge tc_sys_clk) if (dut.u_tc.frame_end) tc_frames++;
  always @(tc_ser_data) tc_toggles++;

  int checks = 0, failures = 0;
  function automatic void chk(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 30) $display("FAIL %s (at %0t)", m, $realtime);
    end
  endfunction

  // ---------------- coarse counter decoding ----------------
  int cc_index [32768];
  initial begin
    logic [14:0] s = 15'h7FFF;
    for (int i = 0; i < 32768; i++) cc_index[i] = -1;
    for (int i = 0; i < 32767; i++) begin
      cc_index[s] = i;
      s = {s[13:0], s[14] ^ s[13]};
    end
  end
  function automatic int stamp_bins(stamp_t s);
    return cc_index[s.cc] * 32 + int'(s.fine);
  endfunction
  function automatic int mod_diff(int a, int b);   // (a - b) in -NBINS/2..NBINS/2
    int d = (a - b) % NBINS;
    if (d < 0) d += NBINS;
    if (d > NBINS / 2) d -= NBINS;
    return d;
  endfunction

  // ---------------- hit injection ----------------
  typedef struct {
    realtime t_rise;
    realtime e_fall;
    bit      has_e;
  } hit_t;
  hit_t expect_q [32][$];
  int   injected [32];
  int   n_e_events = 0, n_noe_events = 0;

  // one hit: timing trigger for t_len, energy trigger from +2 ns for tot
  task automatic inject(int ch, bit has_e, int tot_ps, bit expected);
    hit_t h;
    h.t_rise = $realtime;
    h.has_e  = has_e;
    h.e_fall = $realtime + (2000 + tot_ps) * 1ps;
    injected[ch]++;
    if (expected) expect_q[ch].push_back(h);
    fork
      begin
        t_trig[ch] = 1;
        if (has_e) begin
          #(2ns); e_trig[ch] = 1;
          #(tot_ps * 1ps); e_trig[ch] = 0;
          #(10ns); t_trig[ch] = 0;
        end else begin
          #(20ns); t_trig[ch] = 0;
        end
      end
    join_none
  endtask

  // ---------------- serial receiver ----------------
  logic [9:0] sh = '0;
  int  bitcnt = 0, aligned = 0, dec_err = 0;
  logic [7:0] rx_byte [$];
  logic       rx_k    [$];

  task automatic rx_bit(logic b);
    logic [9:0] r;
    sh = {b, sh[9:1]};
    if (!aligned) begin
      r = decode(sh);
      if (r[9] && r[8] && r[7:0] == K28_5) begin aligned = 1; bitcnt = 0; end
      return;
    end
    bitcnt++;
    if (bitcnt == 10) begin
      bitcnt = 0;
      r = decode(sh);
      if (!r[9]) dec_err++;
      rx_total++;
      rx_byte.push_back(r[7:0]);
      rx_k.push_back(r[8]);
    end
  endtask

  always @(posedge ser_clk) if (rst_n) begin #((HALF / 2) * 1ps); rx_bit(ser_data); end
  always @(negedge ser_clk) if (rst_n) begin #((HALF / 2) * 1ps); rx_bit(ser_data); end

  task automatic next_byte(output logic [7:0] b, output logic k);
    while (rx_byte.size() == 0) @(posedge sys_clk);
    b = rx_byte.pop_front();
    k = rx_k.pop_front();
  endtask

  // ---------------- frame parser and event checks ----------------
  int frames_long = 0, frames_short = 0, frames_prbs = 0, frames_full = 0;
  int rx_total = 0;
  int events_rx = 0, crc_err = 0, fid_err = 0, unexpected = 0;
  int last_fid = -1;
  int t_offset = 0, have_offset = 0;
  bit overload = 0;     // events may be lost: do not match them
  logic [47:0] prbs_first = '0;

  function automatic void check_event(event_t ev, bit short_ev);
    int ch = int'(ev.channel);
    hit_t h;
    events_rx++;
    if (overload) return;
    if (expect_q[ch].size() == 0) begin
      unexpected++;
      chk(0, $sformatf("event on channel %0d without a hit: %h", ch, ev));
      return;
    end
    h = expect_q[ch].pop_front();
    chk(ev.e_flag == h.has_e, $sformatf("channel %0d energy flag", ch));
    chk(!ev.t.badhit, "timing stamp marked bad");
    if (ev.e_flag) n_e_events++; else n_noe_events++;
    begin
      // time of arrival against the injection time
      int inj_bins = int'($floor(h.t_rise / (PER * 1ps) * 32.0));
      int off = mod_diff(stamp_bins(ev.t), inj_bins);
      if (!have_offset) begin t_offset = off; have_offset = 1; end
      chk(off - t_offset >= -2 && off - t_offset <= 2, $sformatf("channel %0d time of arrival off by %0d bins", ch, off - t_offset));
    end
    if (!short_ev && ev.e_flag) begin
      int tot_bins = int'((h.e_fall - h.t_rise) / (PER * 1ps) * 32.0);
      int d = mod_diff(stamp_bins(ev.e), stamp_bins(ev.t));
      chk(d - tot_bins >= -2 && d - tot_bins <= 2, $sformatf("channel %0d ToT %0d bins, expected %0d", ch, d, tot_bins));
    end
    if (!short_ev && !ev.e_flag) chk(ev.e == '0, "energy stamp empty without energy");
  endfunction

  function automatic logic [15:0] ref_crc(logic [7:0] msg [$]);
    logic [15:0] r = 16'hFFFF;
    foreach (msg[i]) for (int k = 7; k >= 0; k--) begin
      automatic logic fb = r[15] ^ msg[i][k];
      r = {r[14:0], 1'b0};
      if (fb) r = r ^ 16'h1021;
    end
    return r;
  endfunction

  initial begin
    logic [7:0] b, mode, n;
    logic k;
    logic [7:0] msg [$];
    int w, nbytes;
    wait (aligned);
    forever begin
      automatic bit bits [$] = {};
      do next_byte(b, k); while (!(k && b == K28_0));
      msg = {};
      next_byte(b, k); msg.push_back(b);
      next_byte(b, k); msg.push_back(b);
      if (last_fid >= 0 && {msg[0], msg[1]} != 16'(last_fid + 1)) fid_err++;
      last_fid = {msg[0], msg[1]};
      next_byte(mode, k); msg.push_back(mode);
      next_byte(n, k);    msg.push_back(n);
      w = mode[7] ? SHORT_EVENT_W : EVENT_W;
      nbytes = (int'(n) * w + 7) / 8;
      for (int i = 0; i < nbytes; i++) begin
        next_byte(b, k);
        msg.push_back(b);
        for (int j = 7; j >= 0; j--) bits.push_back(b[j]);
      end
      for (int e = 0; e < int'(n); e++) begin
        automatic logic [47:0] word = '0;
        for (int j = 0; j < w; j++) word = {word[46:0], bits[e * w + j]};
        if (mode[6]) begin
          if (e == 0) begin
            chk(word != prbs_first, "PRBS payload changes from frame to frame");
            prbs_first = word;
          end
        end else if (mode[7]) begin
          automatic short_event_t s = short_event_t'(word[26:0]);
          automatic event_t ev = '0;
          ev.channel = s.channel; ev.t = s.t; ev.e_flag = s.e_flag;
          check_event(ev, 1);
        end else begin
          check_event(event_t'(word), 0);
        end
      end
      next_byte(b, k); if (k || b != ref_crc(msg)[15:8]) crc_err++;
      next_byte(b, k); if (k || b != ref_crc(msg)[7:0]) crc_err++;
      next_byte(b, k); chk(k && b == K28_4, "end-of-frame marker");
      if (mode[6]) frames_prbs++;
      else if (mode[7]) frames_short++;
      else frames_long++;
      if (n == 8'd255) frames_full++;
    end
  end

  // ---------------- internal activity probes ----------------
  int contention = 0, stall = 0, rejected = 0;
  always @(negedge sys_clk) if (rst_n) begin
    for (int g = 0; g < 4; g++) begin
      automatic int req = 0;
      for (int c = 0; c < 8; c++) req += int'(dut.ev_valid[g][c]);
      if (req > 1) contention++;
      if (dut.ca_valid[g] && !dut.ca_ready[g]) stall++;
    end
  end
  int missed = 0;
  always @(posedge sys_clk) if (rst_n) for (int g = 0; g < 4; g++) if (trig_missed[g]) missed++;

  // ---------------- SPI ----------------
  logic [CFG_W-1:0] cfg, spi_rx;

  function automatic logic [CFG_W-1:0] make_cfg(bit short_mode, bit val, int off, int wid, bit prbs);
    logic [CFG_W-1:0] c = '0;
    glb_cfg_t g = '0;
    g.short_mode = short_mode; g.ext_val_en = val;
    g.win_offset = 5'(off); g.win_width = 6'(wid);
    g.prbs_mode = prbs; g.e_timeout = 8'd32;
    c[GLB_CFG_W-1:0] = g;
    for (int i = 0; i < 32; i++) c[GLB_CFG_W + 16*i +: 16] = {1'b1, 15'(i * 1000 + 7)};
    return c;
  endfunction

  task automatic spi_transfer(logic [CFG_W-1:0] tx, output logic [CFG_W-1:0] rx);
    cs_n = 0;
    #50ns;
    for (int i = 0; i < CFG_W; i++) begin
      sdi = tx[CFG_W-1-i];
      #25ns;
      rx[CFG_W-1-i] = sdo;
      sclk = 1;
      #25ns;
      sclk = 0;
    end
    #50ns;
    cs_n = 1;
    #100ns;
  endtask

  task automatic drain(int us);
    // wait until every expected event has been received
    for (int t = 0; t < us; t++) begin
      automatic int left = 0;
      for (int c = 0; c < 32; c++) left += expect_q[c].size();
      if (left == 0) break;
      #1us;
    end
  endtask

  function automatic int pending();
    int left = 0;
    for (int c = 0; c < 32; c++) left += expect_q[c].size();
    return left;
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  initial begin
    int n_before;
    for (int c = 0; c < 32; c++) injected[c] = 0;
    #1ns rst_n = 0;
    #20ns rst_n = 1;
    #200ns;

    // configuration: full events, no validation
    cfg = make_cfg(0, 0, 0, 1, 0);
    spi_transfer(cfg, spi_rx);
    for (int i = 0; i < 32; i++) chk(ch_dac[i] == 15'(i * 1000 + 7), $sformatf("DAC setting channel %0d", i));
    chk(dut.glb.e_timeout == 8'd32 && !dut.glb.short_mode, "global configuration");

    $display("%0t ps: phase A", $realtime); // phase A: full events, with and without energy, single channels
    for (int n = 0; n < 64; n++) begin
      automatic int ch = $urandom % 32;
      #((20000 + $urandom % 3000) * 1ps);
      inject(ch, (n % 3) != 0, 30000 + ($urandom % 100000), 1);
      #600ns;
    end
    // several channels of group 1 at once
    for (int r = 0; r < 4; r++) begin
      for (int c = 8; c < 16; c++) begin
        inject(c, c[0], 40000 + c * 1000, 1);
        #((100 + $urandom % 200) * 1ps);
      end
      #1us;
    end
    drain(100);
    chk(pending() == 0, $sformatf("phase A: %0d hits without event", pending()));

    $display("%0t ps: phase B", $realtime); // phase B: short events
    cfg = make_cfg(1, 0, 0, 1, 0);
    spi_transfer(cfg, spi_rx);
    for (int n = 0; n < 48; n++) begin
      automatic int ch = $urandom % 32;
      #((10000 + $urandom % 3000) * 1ps);
      inject(ch, n[0], 50000 + ($urandom % 50000), 1);
      #500ns;
    end
    drain(100);
    chk(pending() == 0, $sformatf("phase B: %0d hits without event", pending()));

    $display("%0t ps: phase C", $realtime); // phase C: external validation, window from -4 to +4 ticks (about
    // -312 ns to +312 ns around the trigger)
    cfg = make_cfg(0, 1, 4, 8, 0);
    spi_transfer(cfg, spi_rx);
    #2us;
    for (int r = 0; r < 6; r++) begin
      // outside, before the window
      inject(r, 1, 40000, 0);
      rejected += 2;
      #700ns;
      // inside the window
      inject(8 + r, 1, 60000, 1);
      #150ns;
      ext_trig = 1;
      #30ns ext_trig = 0;
      #120ns;
      inject(16 + r, 1, 30000, 1);   // written to the L1 FIFO before the window closes
      #100ns;
      if (r == 2) begin ext_trig = 1; #30ns ext_trig = 0; end   // during the window
      #600ns;
      // outside, after the window
      inject(24 + r, 1, 40000, 0);
      #3us;
    end
    drain(100);
    chk(pending() == 0, $sformatf("phase C: %0d validated hits without event", pending()));

    $display("%0t ps: counter readout", $realtime); // event counters read over SPI: one event per injected hit
    cfg = make_cfg(0, 0, 0, 1, 0);
    spi_transfer(cfg, spi_rx);
    for (int c = 0; c < 32; c++)
      chk(int'(spi_rx[CFG_W - EVCNT_W * (32 - c) +: EVCNT_W]) == injected[c] % 4096,
          $sformatf("event counter %0d: %0d, injected %0d", c, spi_rx[CFG_W - EVCNT_W * (32 - c) +: EVCNT_W], injected[c]));
    #2us;

    $display("%0t ps: phase D", $realtime); // phase D: PRBS frames
    cfg = make_cfg(0, 0, 0, 1, 1);
    spi_transfer(cfg, spi_rx);
    n_before = frames_prbs;
    #10us;
    begin
      // line rate: 1.28 Gbps of 10-bit symbols, one symbol per 5 periods
      // of the serial clock (7.81 ns here)
      automatic int b0 = rx_total;
      #40us;
      chk(rx_total - b0 >= 5121 && rx_total - b0 <= 5122, $sformatf("%0d symbols in 40 us, expected 5121.6", rx_total - b0));
    end
    chk(frames_prbs > n_before, "PRBS frames sent");
    cfg = make_cfg(0, 0, 0, 1, 0);
    spi_transfer(cfg, spi_rx);

    $display("%0t ps: phase E", $realtime); // phase E: overload burst on all channels
    #5us;
    overload = 1;
    for (int r = 0; r < 60; r++) begin
      for (int c = 0; c < 32; c++) inject(c, 1, 20000, 0);
      #60ns;
    end
    #150us;
    overload = 0;

    // ---- summary ----
    $display("frames long %0d short %0d prbs %0d full %0d, events %0d (energy %0d, timing only %0d)",
             frames_long, frames_short, frames_prbs, frames_full, events_rx, n_e_events, n_noe_events);
    $display("contention %0d, stalls %0d, missed triggers %0d, hits outside the window %0d, test chip frames %0d", contention, stall, missed, rejected, tc_frames);
    chk(dec_err == 0, $sformatf("%0d 8b/10b decoding errors", dec_err));
    chk(crc_err == 0, $sformatf("%0d CRC errors", crc_err));
    chk(fid_err == 0, $sformatf("%0d frame number gaps", fid_err));
    chk(unexpected == 0, "no unexpected events");
    // every mechanism must have happened
    chk(n_e_events > 0, "events with energy");
    chk(n_noe_events > 0, "events without energy (timeout)");
    chk(frames_long > 0, "full-event frames");
    chk(frames_short > 0, "short-event frames");
    chk(frames_prbs > 0, "PRBS frames");
    chk(frames_full > 0, "frames of 255 events");
    chk(contention > 0, "channel arbitration under contention");
    chk(stall > 0, "L1 FIFO full stalls the arbiter");
    chk(missed > 0, "trigger during an open window reported");
    chk(tc_frames > 0 && tc_toggles > 1000, "link test chip sends frames");
    chk(rejected > 0 && unexpected == 0, "hits outside the matching window discarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
