// tb_lvds_testchip: receives the serial output of the link test mock-up and
// checks it completely. The line is sampled in the middle of every half
// period of ser_clk, aligned on the K28.5 comma and decoded with an
// independent 8b/10b table; each frame is parsed and its CRC-16, frame
// number, mode byte, count and end marker are checked. In PRBS mode the
// payload must be the PRBS-31 bit sequence (b[n] = b[n-31] xor b[n-28],
// 31 ones before the first bit) continuing without a gap from frame to
// frame; with the pattern selected every word must equal the pattern.
// The symbol rate is checked at 640 MHz (1.28 Gbps) and the same checks
// run again with a 750 MHz clock (1.5 Gbps).
module tb_lvds_testchip;
  import mutrig_pkg::*;
  import tb_8b10b_pkg::*;

  localparam int MAXEV = 4;      // short frames keep the run short

  logic ser_clk = 0, rst_n = 1, sel_prbs = 1;
  logic [47:0] pattern = 48'hA5C3_0F96_7E81;
  logic sys_clk, ser_data;
  int half_ps = 781;

  lvds_testchip #(.MAX_EVENTS(MAXEV)) dut (.ser_clk, .rst_n, .sel_prbs, .pattern, .sys_clk, .ser_data);

  initial begin
    #(300 * 1ps);
    forever #(half_ps * 1ps) ser_clk = ~ser_clk;
  end

  int checks = 0, failures = 0;
  function automatic void chk(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s (at %0t)", m, $realtime);
    end
  endfunction

  // PRBS-31 reference bit stream
  bit ref_bits [$];
  int ref_pos = 31;
  function automatic bit ref_bit();
    while (ref_bits.size() <= ref_pos)
      ref_bits.push_back(ref_bits[ref_bits.size() - 31] ^ ref_bits[ref_bits.size() - 28]);
    return ref_bits[ref_pos++];
  endfunction

  // ---------------- receiver ----------------
  logic [9:0] sh = '0;
  int bitcnt = 0, aligned = 0, rx_total = 0, dec_err = 0;
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
      rx_total++;
      rx_byte.push_back(r[7:0]);
      rx_k.push_back(r[8]);
    end
  endtask

  always @(posedge ser_clk) if (rst_n) begin #((half_ps / 2) * 1ps); rx_bit(ser_data); end
  always @(negedge ser_clk) if (rst_n) begin #((half_ps / 2) * 1ps); rx_bit(ser_data); end

  task automatic next_byte(output logic [7:0] b, output logic k);
    while (rx_byte.size() == 0) @(posedge sys_clk);
    b = rx_byte.pop_front();
    k = rx_k.pop_front();
  endtask

  // ---------------- frame checker ----------------
  int frames_prbs = 0, frames_pat = 0, last_fid = -1;
  bit expect_prbs = 1;
  int skip = 0;   // frames left unchecked after a source change

  initial begin
    logic [7:0] b, mode, n;
    logic k;
    logic [15:0] crc;
    wait (aligned);
    forever begin
      automatic bit frame_ok_prbs = 1, frame_ok_pat = 1;
      automatic bit was_prbs = expect_prbs;
      do next_byte(b, k); while (!(k && b == K28_0));
      crc = 16'hFFFF;
      next_byte(b, k); crc = crc16_byte(crc, b); begin automatic logic [7:0] hi = b;
      next_byte(b, k); crc = crc16_byte(crc, b);
      if (last_fid >= 0) chk({hi, b} == 16'(last_fid + 1), "frame numbers consecutive");
      last_fid = {hi, b}; end
      next_byte(mode, k); crc = crc16_byte(crc, mode);
      chk(mode == 8'h40, "mode byte: PRBS data, full words");
      next_byte(n, k); crc = crc16_byte(crc, n);
      chk(n == 8'(MAXEV), "word count");
      for (int i = 0; i < MAXEV * 6; i++) begin
        next_byte(b, k); crc = crc16_byte(crc, b);
        chk(!k, "payload is data");
        for (int j = 7; j >= 0; j--) begin
          automatic int bit_i = (i * 8) + (7 - j);
          if (was_prbs && skip == 0) frame_ok_prbs &= (b[j] == ref_bit());
          frame_ok_pat &= (b[j] == pattern[47 - bit_i % 48]);
        end
      end
      next_byte(b, k); chk(!k && b == crc[15:8], "CRC high byte");
      next_byte(b, k); chk(!k && b == crc[7:0], "CRC low byte");
      next_byte(b, k); chk(k && b == K28_4, "end of frame");
      if (skip > 0) skip--;
      else begin
        if (was_prbs) begin chk(frame_ok_prbs, "PRBS-31 payload"); frames_prbs++; end
        else          begin chk(frame_ok_pat, "pattern payload");   frames_pat++; end
      end
    end
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 31; i++) ref_bits.push_back(1'b1);
    #1ns rst_n = 0;
    #20ns rst_n = 1;
    wait (frames_prbs == 20);
    // symbol rate at 640 MHz: one 10-bit symbol per 5 clock periods
    begin
      automatic int b0 = rx_total;
      #10us;
      chk(rx_total - b0 >= 1279 && rx_total - b0 <= 1281, $sformatf("%0d symbols in 10 us at 1.28 Gbps", rx_total - b0));
    end
    // switch to the pattern; the frames in flight are not checked
    @(posedge sys_clk);
    sel_prbs = 0; expect_prbs = 0; skip = 2;
    wait (frames_pat == 20);
    // 1.5 Gbps: 750 MHz clock, 6.667 ns per symbol
    @(posedge ser_clk);
    half_ps = 667;
    #1us;
    begin
      automatic int b0 = rx_total;
      automatic int f0 = frames_pat;
      #10us;
      chk(rx_total - b0 >= 1498 && rx_total - b0 <= 1500, $sformatf("%0d symbols in 10 us at 1.5 Gbps", rx_total - b0));
      chk(frames_pat > f0, "frames received at 1.5 Gbps");
    end
    chk(dec_err == 0, $sformatf("%0d 8b/10b decoding errors", dec_err));
    chk(frames_prbs >= 20 && frames_pat >= 20, "frames of both sources");
    $display("PRBS frames %0d, pattern frames %0d, symbols %0d", frames_prbs, frames_pat, rx_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
