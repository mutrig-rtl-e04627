// tb_mutrig_rate: the fibre-detector rate workload on the full-size chip.
// All 32 channels receive SiPM-like pulses (timing trigger, energy trigger
// from +2 ns for 30-80 ns) and the event rate leaving on the serial line is
// measured with an independent receiver (comma alignment, 8b/10b decoding,
// frame parsing, CRC check).
//
// The link carries 128 M bytes/s. A frame of 255 full events is 1539 bytes
// (255 x 6 + 9 bytes of comma, start, frame number, mode, count, CRC and end
// marker), a frame of 255 short events 870 bytes (ceil(255 x 27 / 8) + 9),
// so the link saturates at 128e6 x 255 / 1539 = 21.21 M events/s with full
// events and 128e6 x 255 / 870 = 37.52 M events/s with short events.
//
//   A  full events, 0.5 MHz per channel (16 M/s): every hit arrives.
//   B  full events, 1.3 MHz per channel (41.6 M/s, Poisson): the link
//      saturates; the measured rate must be 21.21 M/s within 2 %, and the
//      frames carry 255 events.
//   C  short events, 1.1 MHz per channel (35.2 M/s, periodic with random
//      phases): below the short-event limit, every hit arrives.
//   D  short events, 1.3 MHz per channel (Poisson): saturates at 37.52 M/s
//      within 2 %.
//   E  full events, 1.3 MHz per channel, external validation with the
//      largest window (offset 16 ticks = 1.25 us, width 32 ticks = 2.5 us)
//      and a trigger every 20 us. Each received event is matched with its
//      pulse by channel and time stamp. Every pulse well inside a window
//      must arrive, and no event may come from a pulse well outside all
//      windows ("well": 100-300 ns from the edges, which covers the time
//      from the pulse to the write into the L1 FIFO and the trigger
//      synchroniser).
module tb_mutrig_rate;
  import mutrig_pkg::*;
  import tb_8b10b_pkg::*;

  localparam int HALF  = 781;
  localparam int PER   = 2 * HALF;          // VCO period (ps), 32 bins
  localparam int NBINS = 32767 * 32;        // stamp period in bins

  logic pll_ref_clk = 0, ser_clk = 0, rst_n = 1;
  logic [31:0] t_trig = '0, e_trig = '0;
  logic ext_trig = 0, sclk = 0, cs_n = 1, sdi = 0;
  logic sdo, ser_data, sys_clk;
  logic [14:0] ch_dac [32];
  logic [3:0] trig_missed;
  logic tc_sys_clk, tc_ser_data;

  mutrig dut (.pll_ref_clk, .ser_clk, .rst_n, .t_trig, .e_trig, .ext_trig, .sclk, .cs_n, .sdi,
              .sdo, .ser_data, .sys_clk, .ch_dac, .trig_missed,
              .tc_ser_clk(1'b0), .tc_rst_n(1'b0), .tc_sel_prbs(1'b0), .tc_pattern('0),
              .tc_sys_clk, .tc_ser_data);

  always #(HALF * 1ps) pll_ref_clk = ~pll_ref_clk;
  initial begin
    #(300 * 1ps);
    forever #(HALF * 1ps) ser_clk = ~ser_clk;
  end

  int checks = 0, failures = 0;
  function automatic void chk(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s (at %0t)", m, $realtime);
    end
  endfunction

  // ---------------- pulse generators ----------------
  int  mode_gen = 0;           // 0 off, 1 periodic, 2 Poisson
  real period_ns = 1000.0;
  int  injected = 0;
  bit  log_on = 0;
  realtime hit_log [32][$];

  task automatic channel_gen(int ch);
    forever begin
      if (mode_gen == 0) begin
        #(($urandom % 1000) * 1ns);
      end else begin
        real gap;
        if (mode_gen == 1) gap = period_ns;
        else begin
          // exponential gap above a 150 ns dead time, mean period_ns
          real u = (real'($urandom % 1000000) + 0.5) / 1000000.0;
          gap = 150.0 - $ln(u) * (period_ns - 150.0);
        end
        // the pulse (at most 92 ns) is sent at the start of the gap
        begin
          automatic int tot = 30 + $urandom % 50;
          injected++;
          if (log_on) hit_log[ch].push_back($realtime);
          t_trig[ch] = 1;
          #2ns e_trig[ch] = 1;
          #(tot * 1ns) e_trig[ch] = 0;
          #10ns t_trig[ch] = 0;
          #((gap - real'(tot + 12)) * 1ns);
        end
      end
    end
  endtask

  // ---------------- serial receiver ----------------
  logic [9:0] sh = '0;
  int bitcnt = 0, aligned = 0, dec_err = 0;
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
    if (++bitcnt == 10) begin
      bitcnt = 0;
      r = decode(sh);
      if (!r[9]) dec_err++;
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

  // received full events while log_on
  int      rx_ch [$];
  int      rx_bins [$];
  realtime rx_time [$];

  // coarse counter decoding: LFSR state -> position in the sequence
  int cc_index [32768];
  initial begin
    logic [14:0] st = 15'h7FFF;
    for (int i = 0; i < 32768; i++) cc_index[i] = 0;
    for (int i = 0; i < 32767; i++) begin
      cc_index[st] = i;
      st = {st[13:0], st[14] ^ st[13]};
    end
  end
  function automatic int mod_diff(int a, int b);   // (a - b) in -NBINS/2..NBINS/2
    int d = (a - b) % NBINS;
    if (d < 0) d += NBINS;
    if (d > NBINS / 2) d -= NBINS;
    return d;
  endfunction
  function automatic int inj_bins(realtime t);
    return int'($floor(t / (PER * 1ps) * 32.0)) % NBINS;
  endfunction

  int events_rx = 0, frames = 0, frames_full = 0, crc_err = 0, bad_ev = 0;
  realtime last_event_time = 0;
  event    frame_done;

  initial begin
    logic [7:0] b, mode, n;
    logic k;
    logic [15:0] crc;
    wait (aligned);
    forever begin
      automatic bit bits [$] = {};
      automatic int w;
      do next_byte(b, k); while (!(k && b == K28_0));
      crc = 16'hFFFF;
      next_byte(b, k); crc = crc16_byte(crc, b);
      next_byte(b, k); crc = crc16_byte(crc, b);
      next_byte(mode, k); crc = crc16_byte(crc, mode);
      next_byte(n, k); crc = crc16_byte(crc, n);
      w = mode[7] ? SHORT_EVENT_W : EVENT_W;
      for (int i = 0; i < (int'(n) * w + 7) / 8; i++) begin
        next_byte(b, k); crc = crc16_byte(crc, b);
        for (int j = 7; j >= 0; j--) bits.push_back(b[j]);
      end
      for (int e = 0; e < int'(n); e++) begin
        // first field of either format: the channel; last bit: e_flag
        automatic logic ef = bits[e * w + w - 1];
        if (!ef) bad_ev++;          // every pulse crosses the energy threshold
        if (log_on && !mode[7]) begin
          automatic logic [47:0] word = '0;
          automatic event_t ev;
          for (int j = 0; j < w; j++) word = {word[46:0], bits[e * w + j]};
          ev = event_t'(word);
          rx_ch.push_back(int'(ev.channel));
          rx_bins.push_back(cc_index[ev.t.cc] * 32 + int'(ev.t.fine));
          rx_time.push_back($realtime);
        end
      end
      next_byte(b, k); if (k || b != crc[15:8]) crc_err++;
      next_byte(b, k); if (k || b != crc[7:0]) crc_err++;
      next_byte(b, k); if (!(k && b == K28_4)) crc_err++;
      frames++;
      if (n == 8'd255) frames_full++;
      events_rx += int'(n);
      if (n != 0) last_event_time = $realtime;
      -> frame_done;
    end
  end

  // ---------------- SPI ----------------
  task automatic spi_config(bit short_mode, bit val = 0, int off = 0, int wid = 1);
    logic [CFG_W-1:0] c = '0;
    glb_cfg_t g = '0;
    g.short_mode = short_mode; g.e_timeout = 8'd32;
    g.ext_val_en = val; g.win_offset = 5'(off); g.win_width = 6'(wid);
    c[GLB_CFG_W-1:0] = g;
    for (int i = 0; i < 32; i++) c[GLB_CFG_W + 16*i +: 16] = {1'b1, 15'd0};
    cs_n = 0;
    #50ns;
    for (int i = 0; i < CFG_W; i++) begin
      sdi = c[CFG_W-1-i];
      #25ns sclk = 1;
      #25ns sclk = 0;
    end
    #50ns cs_n = 1;
    #100ns;
  endtask

  // wait until nothing has arrived for 5 us
  task automatic drain();
    realtime t0;
    do begin
      t0 = last_event_time;
      #5us;
    end while (last_event_time != t0 || dut.l2_count != 0);
  endtask

  // rate between two frame ends, so that whole frames are counted
  task automatic measure(string name, real expect_mhz, int us);
    int e0, f0;
    realtime t0;
    real rate;
    @(frame_done);
    e0 = events_rx; f0 = frames_full; t0 = $realtime;
    #(us * 1us);
    @(frame_done);
    rate = real'(events_rx - e0) / (($realtime - t0) / 1us);
    $display("%s: %0.2f M events/s (link limit %0.2f), %0d full frames", name, rate, expect_mhz, frames_full - f0);
    chk(rate > 0.98 * expect_mhz && rate < 1.02 * expect_mhz, $sformatf("%s: saturated rate %0.2f M/s", name, rate));
    chk(frames_full - f0 > 0, $sformatf("%s: frames of 255 events", name));
  endtask

  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, i0;
    for (int c = 0; c < 32; c++) fork automatic int ch = c; channel_gen(ch); join_none
    #1ns rst_n = 0;
    #20ns rst_n = 1;
    #1us;

    // A: full events at 0.5 MHz per channel
    e0 = events_rx; i0 = injected;
    period_ns = 2000.0; mode_gen = 2;
    #60us;
    mode_gen = 0;
    #200ns;
    drain();
    $display("A: %0d hits, %0d events", injected - i0, events_rx - e0);
    chk(injected - i0 > 800 && events_rx - e0 == injected - i0, "A: every hit arrives at 16 M/s");

    // B: full events at 1.3 MHz per channel
    period_ns = 769.2; mode_gen = 2;
    #30us;
    measure("B full events", 128.0 * 255.0 / 1539.0, 60);
    mode_gen = 0;
    #200ns;
    drain();

    // C: short events at 1.1 MHz per channel, periodic
    spi_config(1);
    e0 = events_rx; i0 = injected;
    period_ns = 909.1; mode_gen = 1;
    #60us;
    mode_gen = 0;
    #200ns;
    drain();
    $display("C: %0d hits, %0d events", injected - i0, events_rx - e0);
    chk(events_rx - e0 == injected - i0, "C: every hit arrives at 35.2 M/s in short mode");

    // D: short events at 1.3 MHz per channel
    // the excess over the link is only 4 M/s: give the L2 FIFO time to fill
    period_ns = 769.2; mode_gen = 2;
    #150us;
    measure("D short events", 128.0 * 255.0 / 870.0, 80);
    mode_gen = 0;
    #200ns;
    drain();

    // E: calibration of the stamp offset with one pulse, then validation
    begin
      realtime trig [$];
      realtime t_cal;
      int off, n_in = 0, found = 0, unmatched = 0, outside = 0;
      spi_config(0);
      rx_ch.delete(); rx_bins.delete(); rx_time.delete();
      log_on = 1;
      t_cal = $realtime;
      t_trig[3] = 1; #2ns e_trig[3] = 1; #40ns e_trig[3] = 0; #10ns t_trig[3] = 0;
      #3us;
      chk(rx_ch.size() == 1 && rx_ch[0] == 3, "E: calibration event");
      off = (rx_bins.size() > 0) ? mod_diff(rx_bins[0], inj_bins(t_cal)) : 0;
      rx_ch.delete(); rx_bins.delete(); rx_time.delete();
      for (int c = 0; c < 32; c++) hit_log[c].delete();

      spi_config(0, 1, 16, 32);
      period_ns = 769.2; mode_gen = 2;
      #5us;
      for (int k = 0; k < 8; k++) begin
        trig.push_back($realtime);
        ext_trig = 1; #30ns ext_trig = 0;
        #(20us - 30ns);
      end
      mode_gen = 0;
      #200ns;
      drain();
      log_on = 0;

      // pulses well inside a window must have arrived
      foreach (trig[k]) for (int c = 0; c < 32; c++) foreach (hit_log[c][i]) begin
        automatic realtime h = hit_log[c][i];
        if (h > trig[k] - 1.15us && h < trig[k] + 0.95us) begin
          automatic bit hit_found = 0;
          n_in++;
          foreach (rx_ch[j])
            if (rx_ch[j] == c && mod_diff(rx_bins[j], inj_bins(h) + off) inside {[-3:3]}) hit_found = 1;
          if (hit_found) found++;
        end
      end
      // every event must come from a pulse near a window
      foreach (rx_ch[j]) begin
        automatic int c = rx_ch[j];
        automatic bit matched = 0, near = 0;
        foreach (hit_log[c][i]) begin
          automatic realtime h = hit_log[c][i];
          if (h < rx_time[j] && h > rx_time[j] - 20us &&
              mod_diff(rx_bins[j], inj_bins(h) + off) inside {[-3:3]}) begin
            matched = 1;
            foreach (trig[k]) if (h > trig[k] - 1.5us && h < trig[k] + 1.35us) near = 1;
          end
        end
        if (!matched) unmatched++;
        else if (!near) outside++;
      end
      $display("E: %0d triggers, %0d pulses well inside a window, %0d of them received; %0d events, %0d unmatched, %0d from outside",
               trig.size(), n_in, found, rx_ch.size(), unmatched, outside);
      chk(n_in > 400, "E: pulses inside the windows");
      chk(found == n_in, $sformatf("E: %0d pulses inside a window lost", n_in - found));
      chk(unmatched == 0, $sformatf("E: %0d events match no pulse", unmatched));
      chk(outside == 0, $sformatf("E: %0d events from outside the windows", outside));
      chk(rx_ch.size() < injected, "E: validation discards events");
    end

    chk(dec_err == 0, $sformatf("%0d 8b/10b decoding errors", dec_err));
    chk(crc_err == 0, $sformatf("%0d CRC or framing errors", crc_err));
    chk(bad_ev == 0, $sformatf("%0d events without energy flag", bad_ev));
    $display("frames %0d, events %0d, hits %0d", frames, events_rx, injected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
