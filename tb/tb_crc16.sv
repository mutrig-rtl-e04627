// tb_crc16: checks the CRC register against the published check value of
// this CRC-16 (polynomial 0x1021, init 0xFFFF, no reflection): "123456789"
// gives 0x29B1. Then random frames are compared with a reference computed
// from the polynomial division of the whole message, one bit at a time, and
// a frame followed by its own CRC must leave a zero remainder.
module tb_crc16;
  logic clk = 0, rst_n = 1, clear = 0, en = 0;
  logic [7:0] data = 0;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  crc16 dut (.clk, .rst_n, .clear, .en, .data, .crc);

  always #4 clk = ~clk;

  function automatic logic [15:0] ref_crc(logic [7:0] msg [$]);
    // long division of (message with the first 16 bits inverted) * x^16
    bit bits [$];
    logic [16:0] r = '0;
    foreach (msg[i]) for (int k = 7; k >= 0; k--) bits.push_back(msg[i][k] ^ (i < 2));
    for (int k = 0; k < 16; k++) bits.push_back(1'b0);
    foreach (bits[i]) begin
      r = {r[15:0], bits[i]};
      if (r[16]) r = r ^ 17'h11021;
    end
    return r[15:0];
  endfunction

  task automatic send(logic [7:0] msg [$]);
    @(negedge clk);
    foreach (msg[i]) begin
      clear = (i == 0); en = 1; data = msg[i];
      @(negedge clk);
    end
    clear = 0; en = 0;
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] m [$];
    #1 rst_n = 0; #10 rst_n = 1;
    m = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    send(m);
    checks++;
    if (crc != 16'h29B1) begin failures++; $display("FAIL check value %h", crc); end
    for (int f = 0; f < 50; f++) begin
      automatic int len = 2 + $urandom % 40;
      m = {};
      for (int i = 0; i < len; i++) m.push_back(8'($urandom));
      send(m);
      checks++;
      if (crc != ref_crc(m)) begin failures++; $display("FAIL frame %0d: %h expected %h", f, crc, ref_crc(m)); end
      m.push_back(crc[15:8]); m.push_back(crc[7:0]);
      send(m);
      checks++;
      if (crc != 16'h0000) begin failures++; $display("FAIL residue %h", crc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
