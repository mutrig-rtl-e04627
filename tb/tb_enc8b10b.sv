// tb_enc8b10b: encodes all 256 data bytes and the control characters many
// times over in random order and checks every code group: it decodes back
// to its byte, its disparity is 0 or +-2, the running disparity stays in
// {-1, +1} and matches the rd output, no run on the line exceeds five equal
// bits, and the comma pattern (0011111 or 1100000) appears only inside
// K28.5 (and K28.1, K28.7). A few code groups are compared with the
// published table, e.g. K28.5 = 001111 1010 / 110000 0101, D0.0 = 100111
// 0100 / 011000 1011.
module tb_enc8b10b;
  import tb_8b10b_pkg::*;
  typedef struct packed { logic ok; logic k; logic [7:0] data; } dec_t;
  logic clk = 0, rst_n = 1, en = 0, k = 0, rd;
  logic [7:0] data = 0;
  logic [9:0] code;
  int checks = 0, failures = 0;
  int run_disp = -1, run_len = 0, bad_run = 0, bad_disp = 0, bad_dec = 0, commas = 0, bad_comma = 0;
  logic last_bit = 0;
  logic [6:0] win = '0;

  enc8b10b dut (.clk, .rst_n, .en, .data, .k, .code, .rd);

  always #4 clk = ~clk;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic logic [9:0] line(string s);   // "abcdei fghj" -> code
    logic [9:0] c;
    int j = 0;
    for (int i = 0; i < s.len(); i++) if (s[i] == "0" || s[i] == "1") begin
      c[j] = (s[i] == "1");
      j++;
    end
    return c;
  endfunction

  task automatic send(logic [7:0] d, logic kk, output logic [9:0] c);
    int di;
    dec_t r;
    logic comma_here;
    @(negedge clk);
    en = 1; data = d; k = kk;
    @(negedge clk);
    en = 0;
    c = code;
    di = disparity(c);
    r = decode(c);
    checks++;
    if (!r.ok || r.data != d || r.k != kk) begin
      bad_dec++; failures++;
      $display("FAIL %s%0d.%0d coded %b decodes to %h k=%b", kk ? "K" : "D", d[4:0], d[7:5], c, r.data, r.k);
    end
    if (!(di == 0 || di == 2 || di == -2) || (di != 0 && di == 2 * run_disp)) bad_disp++;
    if (di != 0) run_disp = -run_disp;
    checks++;
    if ((run_disp > 0) != rd) begin failures++; $display("FAIL rd output"); end
    comma_here = 0;
    for (int i = 0; i < 10; i++) begin
      if (c[i] == last_bit) run_len++; else run_len = 1;
      last_bit = c[i];
      if (run_len > 5) bad_run++;
      win = {win[5:0], c[i]};
      if (i == 6 && (win == 7'b0011111 || win == 7'b1100000)) comma_here = 1;  // bits a..g
    end
    if (comma_here) begin
      commas++;
      if (!(kk && d[4:0] == 5'd28 && (d[7:5] == 1 || d[7:5] == 5 || d[7:5] == 7))) bad_comma++;
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] c;
    logic [7:0] kcodes [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};
    #1 rst_n = 0; #10 rst_n = 1;
    // published code groups, starting from negative running disparity
    send(8'hBC, 1, c); chk(c == line("001111 1010"), $sformatf("K28.5 RD- %b", c));
    send(8'h00, 0, c); chk(c == line("011000 1011"), $sformatf("D0.0 RD+ %b", c));
    send(8'hBC, 1, c); chk(c == line("110000 0101"), $sformatf("K28.5 RD+ %b", c));
    send(8'h00, 0, c); chk(c == line("100111 0100"), $sformatf("D0.0 RD- %b", c));
    send(8'hB5, 0, c); chk(c == line("101010 1010"), $sformatf("D21.5 %b", c));
    send(8'h1C, 1, c); chk(c == line("001111 0100"), $sformatf("K28.0 RD- %b", c));
    send(8'h9C, 1, c); chk(c == line("001111 0010"), $sformatf("K28.4 RD- %b", c));
    for (int n = 0; n < 4000; n++) begin
      if ($urandom % 8 == 0) send(kcodes[$urandom % 12], 1, c);
      else                   send(8'($urandom), 0, c);
    end
    for (int d = 0; d < 256; d++) send(8'(d), 0, c);
    for (int d = 0; d < 256; d++) send(8'(d), 0, c);
    chk(bad_disp == 0, $sformatf("%0d code groups with bad disparity", bad_disp));
    chk(bad_run == 0, $sformatf("%0d runs longer than five", bad_run));
    chk(bad_comma == 0 && commas > 0, $sformatf("commas %0d, misplaced %0d", commas, bad_comma));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
