// tb_l1_fifo: checks both modes of the L1 FIFO.
// Normal mode: random traffic against a queue model, including the writer
// being stalled when the FIFO is full.
// External validation: events are written at random cycles and tagged with
// the cycle number. For each trigger the expected window is worked out from
// the cycle the synchronised trigger is seen in: ticks are 10 cycles
// counted from reset, the window runs from tick T - offset to T - offset +
// width, and exactly the events written in those cycles must be read out,
// in order, and none before the end of the window has been recorded. Also
// checked: offset clamping at 16 ticks and a second trigger during a window
// being reported as missed.
module tb_l1_fifo;
  import mutrig_pkg::*;
  logic clk = 0, rst_n = 1;
  logic ext_val_en = 0, ext_trig = 0;
  logic [4:0] win_offset = 0;
  logic [5:0] win_width = 0;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0, win_busy, trig_missed;
  event_t wr_ev = '0, rd_ev;
  int checks = 0, failures = 0;
  int edge_n = -1;            // index of the last rising edge since reset
  int wr_edge [$];            // validation mode: edge of each write
  event_t q [$];              // normal mode model
  event_t got [$];
  int got_edge [$];
  int stalls = 0, missed = 0;

  l1_fifo dut (.clk, .rst_n, .ext_val_en, .win_offset, .win_width, .ext_trig,
    .wr_valid, .wr_ready, .wr_ev, .rd_valid, .rd_ready, .rd_ev, .win_busy, .trig_missed);

  always #4 clk = ~clk;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  always @(posedge clk) if (rst_n) begin
    edge_n++;
    if (trig_missed) missed++;
    if (ext_val_en) begin
      if (wr_valid && wr_ready) wr_edge.push_back(edge_n);
      if (rd_valid && rd_ready) begin got.push_back(rd_ev); got_edge.push_back(edge_n); end
    end
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one validation-mode window and check it
  task automatic window(int off, int wid, int pre, int rate);
    int m, t, s, e, eff_off, n_exp;
    got = {}; got_edge = {};
    win_offset = 5'(off); win_width = 6'(wid);
    repeat (pre) begin
      @(negedge clk);
      wr_valid = ($urandom % rate) == 0;
      wr_ev = '0; wr_ev.t.cc = 15'(edge_n + 1);
    end
    @(negedge clk);
    wr_valid = 0;
    ext_trig = 1;
    m = edge_n + 1;          // first edge that samples the trigger
    eff_off = off > 16 ? 16 : off;
    t = (m + 1) / 10;
    s = t - eff_off;
    e = s + (wid > 32 ? 32 : wid);
    repeat (3) @(negedge clk);
    ext_trig = 0;
    // keep writing until the window has been read
    do begin
      @(negedge clk);
      wr_valid = ($urandom % rate) == 0;
      wr_ev = '0; wr_ev.t.cc = 15'(edge_n + 1);
      rd_ready = ($urandom % 4) != 0;
    end while (win_busy || edge_n < 10 * e + 5);
    n_exp = 0;
    foreach (wr_edge[i]) if (wr_edge[i] >= 10 * s && wr_edge[i] < 10 * e) begin
      if (n_exp < got.size())
        chk(int'(got[n_exp].t.cc) == wr_edge[i], $sformatf("window event %0d: written at %0d, expected %0d", n_exp, got[n_exp].t.cc, wr_edge[i]));
      n_exp++;
    end
    chk(got.size() == n_exp && n_exp > 0, $sformatf("window off=%0d wid=%0d: %0d events, expected %0d", off, wid, got.size(), n_exp));
    if (got_edge.size() > 0)
      chk(got_edge[0] >= 10 * e, $sformatf("read before window end: edge %0d, end %0d", got_edge[0], 10 * e));
  endtask

  initial begin
    #1 rst_n = 0; #10 rst_n = 1;

    // ---- normal mode ----
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      wr_valid = (c < 1000) ? 1'b1 : ($urandom % 2);
      rd_ready = (c < 1000) ? ($urandom % 8 == 0) : ($urandom % 2);
      wr_ev = '0; wr_ev.t.cc = 15'($urandom); wr_ev.channel = 5'($urandom);
      #1;
      chk(wr_ready == (q.size() < 128) && rd_valid == (q.size() > 0), $sformatf("flags at %0d, model %0d", c, q.size()));
      if (rd_valid) chk(rd_ev == q[0], "normal mode data");
      if (wr_valid && !wr_ready) stalls++;
      @(posedge clk);
      if (rd_valid && rd_ready) void'(q.pop_front());
      if (wr_valid && wr_ready) q.push_back(wr_ev);
    end
    chk(stalls > 0, "writer stalled when full");

    // ---- validation mode ----
    @(negedge clk);
    wr_valid = 0; rd_ready = 1;
    ext_val_en = 1;
    repeat (5) @(negedge clk);
    chk(!rd_valid, "mode switch empties the read side");
    window(4, 6, 300, 2);     // window reaches past the trigger
    window(10, 3, 200, 2);    // window entirely before the trigger
    window(0, 32, 100, 4);   // fewer events than the buffer holds    // maximal width
    window(25, 20, 400, 3);   // offset clamped to 16

    // second trigger while a window is open
    win_offset = 0; win_width = 8;
    @(negedge clk); ext_trig = 1; repeat (3) @(negedge clk); ext_trig = 0;
    repeat (10) @(negedge clk); ext_trig = 1; repeat (3) @(negedge clk); ext_trig = 0;
    repeat (200) @(negedge clk);
    chk(missed == 1, $sformatf("missed triggers %0d", missed));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
