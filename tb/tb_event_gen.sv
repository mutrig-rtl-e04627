// tb_event_gen: acts as a TDC channel (two stamp banks and a Gray-coded
// edge count) and checks the events built from them: a timing stamp
// followed by an energy stamp gives one event with both and e_flag = 1; a
// timing stamp alone gives an event with e_flag = 0 exactly e_timeout
// cycles after it was taken; three stamps at once mark badhit; a disabled
// channel builds nothing; an event waits until the arbiter accepts it.
module tb_event_gen;
  import mutrig_pkg::*;
  logic clk = 0, rst_n = 1, enable = 1;
  logic [7:0] e_timeout = 8'd20;
  logic [1:0] gray = 0;
  stamp_t bank [2];
  logic ev_valid, ev_ready = 1, hit_pulse;
  event_t ev;
  int checks = 0, failures = 0, npulse = 0;
  int cnt = 0;

  event_gen #(.CHANNEL(5'd13)) dut (.clk, .rst_n, .enable, .e_timeout, .edge_gray(gray), .bank,
    .ev_valid, .ev_ready, .ev, .hit_pulse);

  always #4 clk = ~clk;
  always @(posedge clk) if (hit_pulse) npulse++;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // one TDC edge: latch into bank[cnt%2], advance the Gray count
  task automatic tdc_edge(stamp_t s);
    bank[cnt % 2] = s;
    cnt++;
    gray = 2'(cnt) ^ (2'(cnt) >> 1);
  endtask

  task automatic wait_event(output event_t e, output int cycles);
    cycles = 0;
    while (!(ev_valid && ev_ready)) begin @(posedge clk); cycles++; #1; end
    e = ev;
    @(posedge clk); #1;
  endtask

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    event_t e;
    int cyc;
    stamp_t ts, es;
    bank[0] = '0; bank[1] = '0;
    #1 rst_n = 0; #10 rst_n = 1;
    @(posedge clk); #1;

    // 1. timing + energy stamps, 6 cycles apart
    for (int n = 0; n < 20; n++) begin
      ts = '{badhit: 0, cc: 15'($urandom), fine: 5'($urandom)};
      es = '{badhit: 0, cc: 15'($urandom), fine: 5'($urandom)};
      tdc_edge(ts);
      repeat (6) @(posedge clk); #1;
      tdc_edge(es);
      wait_event(e, cyc);
      chk(e.channel == 5'd13 && e.t == ts && e.e == es && e.e_flag, $sformatf("pair %0d fields", n));
      chk(cyc <= 4, $sformatf("pair %0d latency %0d", n, cyc));
      repeat (30) @(posedge clk); #1;
    end

    // 2. timing stamp alone: event after e_timeout cycles, e_flag = 0
    for (int n = 0; n < 5; n++) begin
      ts = '{badhit: 0, cc: 15'($urandom), fine: 5'($urandom)};
      tdc_edge(ts);
      wait_event(e, cyc);
      chk(e.t == ts && !e.e_flag && e.e == '0, "timing-only fields");
      // 2 synchroniser cycles + 1 to take the stamp + e_timeout
      chk(cyc >= int'(e_timeout) + 1 && cyc <= int'(e_timeout) + 4, $sformatf("timeout latency %0d", cyc));
      repeat (5) @(posedge clk); #1;
    end

    // 3. three stamps before the synchroniser sees any: badhit
    tdc_edge(ts); tdc_edge(es); tdc_edge(es);
    wait_event(e, cyc);
    chk(e.t.badhit || e.e.badhit, "overrun marks badhit");
    repeat (40) @(posedge clk); #1;

    // 4. back-pressure: the event is held until accepted
    ev_ready = 0;
    tdc_edge(ts); repeat (4) @(posedge clk); #1; tdc_edge(es);
    repeat (30) @(posedge clk); #1;
    chk(ev_valid && ev.t == ts && ev.e == es, "event held while not ready");
    ev_ready = 1;
    @(posedge clk); #1;
    chk(!ev_valid, "event released");

    // 5. disabled channel: no events
    begin
      automatic int n_before = npulse;
      enable = 0;
      tdc_edge(ts); repeat (3) @(posedge clk); #1; tdc_edge(es);
      repeat (40) @(posedge clk); #1;
      chk(!ev_valid && npulse == n_before, "disabled channel silent");
      enable = 1;
    end
    chk(npulse == 28, $sformatf("hit pulses %0d", npulse));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
