// tb_frame_gen: feeds the frame generator from a show-ahead FIFO model and
// parses the byte stream it produces: comma, K28.0, frame number, mode,
// event count, packed payload, CRC, K28.4. Checks that frame numbers count
// up, that the CRC matches a bit-serial reference, that the unpacked events
// are the ones taken from the FIFO in order (48-bit full events, or the
// 27-bit short form), that PRBS frames carry MAX_EVENTS words of the PRBS
// source, that a burst larger than MAX_EVENTS is split over frames, and
// that a frame takes exactly 9 + payload bytes, one byte per cycle.
module tb_frame_gen;
  import mutrig_pkg::*;
  localparam int MAXE = 255;
  logic clk = 0, rst_n = 1, short_mode = 0, prbs_mode = 0;
  logic ev_valid, ev_ready, prbs_next, k_o, frame_end;
  event_t ev;
  logic [8:0] ev_count;
  logic [47:0] prbs_data = 48'h1;
  logic [7:0] byte_o;
  event_t q [$];
  logic [47:0] taken [$];     // words popped, in order (events or PRBS)
  int checks = 0, failures = 0;
  int frames_long = 0, frames_short = 0, frames_prbs = 0, frames_full = 0, frames_empty = 0;

  frame_gen #(.MAX_EVENTS(MAXE), .CNT_W(9)) dut (.clk, .rst_n, .short_mode, .prbs_mode,
    .ev_valid, .ev_ready, .ev, .ev_count, .prbs_data, .prbs_next, .byte_o, .k_o, .frame_end);

  always #4 clk = ~clk;

  // FIFO model outputs, refreshed after every change of q
  function automatic void refresh();
    ev_valid = q.size() > 0;
    ev       = q.size() > 0 ? q[0] : '0;
    ev_count = 9'(q.size() > 511 ? 511 : q.size());
  endfunction
  initial refresh();

  // Handshakes are sampled at the falling edge, where they are stable; the
  // FIFO model then changes 1 ns after the rising edge that consumed.
  always @(negedge clk) begin
    automatic bit pop_ev = ev_ready && ev_valid;
    automatic bit pop_prbs = prbs_next;
    @(posedge clk);
    #1;
    if (pop_ev) begin taken.push_back(q.pop_front()); refresh(); end
    if (pop_prbs) begin
      taken.push_back(prbs_data);
      prbs_data = {prbs_data[46:0], prbs_data[47] ^ prbs_data[41]};
    end
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic logic [15:0] ref_crc(logic [7:0] msg [$]);
    logic [15:0] r = 16'hFFFF;
    foreach (msg[i]) for (int k = 7; k >= 0; k--) begin
      automatic logic fb = r[15] ^ msg[i][k];
      r = {r[14:0], 1'b0};
      if (fb) r = r ^ 16'h1021;
    end
    return r;
  endfunction

  // byte parser
  logic [7:0] bytes [$];
  logic       kflag [$];
  always @(negedge clk) if (rst_n) begin bytes.push_back(byte_o); kflag.push_back(k_o); end

  task automatic next_byte(output logic [7:0] b, output logic k);
    while (bytes.size() == 0) @(posedge clk);
    b = bytes.pop_front();
    k = kflag.pop_front();
  endtask

  int last_fid = -1;
  initial begin
    logic [7:0] b, mode, n;
    logic k;
    logic [7:0] crcmsg [$];
    int nbytes, w, len;
    @(posedge rst_n);
    forever begin
      // find the start of a frame
      do next_byte(b, k); while (!(k && b == K28_0));
      crcmsg = {};
      len = 1;
      next_byte(b, k); crcmsg.push_back(b);
      next_byte(b, k); crcmsg.push_back(b);
      if (last_fid >= 0) chk({crcmsg[0], crcmsg[1]} == 16'(last_fid + 1), "frame number counts up");
      last_fid = {crcmsg[0], crcmsg[1]};
      next_byte(mode, k); crcmsg.push_back(mode);
      next_byte(n, k);    crcmsg.push_back(n);
      w = mode[7] ? 27 : 48;
      nbytes = (int'(n) * w + 7) / 8;
      begin
        automatic bit bits [$] = {};
        for (int i = 0; i < nbytes; i++) begin
          next_byte(b, k);
          crcmsg.push_back(b);
          for (int j = 7; j >= 0; j--) bits.push_back(b[j]);
        end
        for (int e = 0; e < int'(n); e++) begin
          logic [47:0] got, exp;
          got = '0;
          for (int j = 0; j < w; j++) got = {got[46:0], bits[e * w + j]};
          if (taken.size() == 0) begin chk(0, "event in frame never taken"); break; end
          exp = taken.pop_front();
          if (mode[7]) exp = 48'(to_short(event_t'(exp)));
          chk(got == exp, $sformatf("frame %0d event %0d: %h expected %h (n=%0d left %0d q0 %h)", last_fid, e, got, exp, n, taken.size(), taken.size() ? taken[0] : 0));
        end
      end
      next_byte(b, k); chk(!k && b == ref_crc(crcmsg)[15:8], "CRC high byte");
      next_byte(b, k); chk(!k && b == ref_crc(crcmsg)[7:0], "CRC low byte");
      next_byte(b, k); chk(k && b == K28_4, "end of frame");
      next_byte(b, k); chk(k && b == K28_5, "comma");
      if (mode[6]) begin frames_prbs++; chk(n == 8'(MAXE), "PRBS frame is full"); end
      else if (mode[7]) frames_short++;
      else frames_long++;
      if (n == 8'(MAXE)) frames_full++;
      if (n == 0) frames_empty++;
      // the next byte must be the next start of frame: 9 + payload bytes
      while (bytes.size() == 0) @(posedge clk);
      chk(kflag[0] && bytes[0] == K28_0, "frames back to back");
    end
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push_events(int n);
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      event_t e;
      e = event_t'({$urandom, $urandom});
      q.push_back(e);
    end
    refresh();
  endtask

  initial begin
    #1 rst_n = 0; #10 rst_n = 1;
    repeat (30) @(posedge clk);                 // empty frames
    for (int r = 0; r < 20; r++) begin push_events($urandom % 20); repeat (50) @(posedge clk); end
    push_events(600);                           // burst larger than a frame
    wait (q.size() == 0);
    repeat (200) @(posedge clk);
    @(negedge clk) short_mode = 1;
    for (int r = 0; r < 20; r++) begin push_events($urandom % 30); repeat (60) @(posedge clk); end
    wait (q.size() == 0);
    repeat (200) @(posedge clk);
    @(negedge clk) prbs_mode = 1;
    repeat (3000) @(posedge clk);
    @(negedge clk) prbs_mode = 0; short_mode = 0;
    repeat (3000) @(posedge clk);
    chk(frames_long > 10 && frames_short > 5 && frames_prbs > 2, $sformatf("frames long %0d short %0d prbs %0d", frames_long, frames_short, frames_prbs));
    chk(frames_full >= 2 && frames_empty > 0, $sformatf("full frames %0d empty %0d", frames_full, frames_empty));
    chk(taken.size() == 0, $sformatf("%0d taken words not seen in frames", taken.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
