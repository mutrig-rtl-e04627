// tb_serializer: loads random 10-bit code groups every five serial clock
// cycles and samples the line in the middle of every half clock period.
// The ten bits of a group must appear in order, bit 0 first, starting in
// the high phase after the loading edge, one bit per half period: ten bits
// per five clock cycles, i.e. 1.28 Gbps for a 640 MHz clock.
module tb_serializer;
  localparam int HALF = 781;   // ps, 640 MHz
  logic ser_clk = 0, rst_n = 1, byte_rd = 0, ser_data;
  logic [9:0] data = '0;
  logic [9:0] sent [$];
  int checks = 0, failures = 0, words = 0;

  serializer dut (.ser_clk, .rst_n, .byte_rd, .data, .ser_data);

  always #(HALF * 1ps) ser_clk = ~ser_clk;

  initial begin
    #50us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ns rst_n = 0; #3ns rst_n = 1;
    // stimulus: byte_rd high at one rising edge in five; data changes two
    // cycles after it has been loaded
    for (int n = 0; n < 300; n++) begin
      @(negedge ser_clk);
      data = 10'($urandom);
      sent.push_back(data);
      byte_rd = 1;
      @(negedge ser_clk);
      byte_rd = 0;
      repeat (3) @(negedge ser_clk);
    end
    #20ns;
    checks++;
    if (words < 290) begin failures++; $display("FAIL only %0d words checked", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver: after a loading edge, sample 10 half periods
  always @(posedge ser_clk) if (byte_rd && rst_n) begin
    automatic logic [9:0] got;
    automatic logic [9:0] exp = sent[0];
    for (int i = 0; i < 10; i++) begin
      #((HALF / 2) * 1ps);
      got[i] = ser_data;
      if (i < 9) #((HALF - HALF / 2) * 1ps);
    end
    void'(sent.pop_front());
    words++;
    checks++;
    if (got != exp) begin failures++; $display("FAIL word %0d: %b expected %b", words, got, exp); end
  end
endmodule
