// tb_coarse_counter: runs the 15-bit LFSR coarse counter through a full
// period and compares every state with a bit-serial reference sequence
// (s[n] = s[n-15] xor s[n-14]); the period must be 2^15 - 1 and the
// all-zero state must never appear.
module tb_coarse_counter;
  logic clk = 0, rst_n = 1;
  logic [14:0] cc;
  int checks = 0, failures = 0;
  int mism = 0, zeros = 0, period = 0;
  bit seq [$];

  coarse_counter #(.CC_W(15)) dut (.vco_clk(clk), .rst_n, .cc);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] first, ref_state;
    #1 rst_n = 0;
    #11 rst_n = 1;
    first = cc;
    // reference: the register holds the last 15 bits of the sequence
    for (int i = 14; i >= 0; i--) seq.push_back(first[i]);
    for (int n = 1; n <= 32767; n++) begin
      @(negedge clk);
      seq.push_back(seq[seq.size()-15] ^ seq[seq.size()-14]);
      for (int i = 0; i < 15; i++) ref_state[i] = seq[seq.size()-1-i];
      if (cc != ref_state) mism++;
      if (cc == '0) zeros++;
      if (cc == first && period == 0) period = n;
    end
    checks++;
    if (first != 15'h7FFF) begin failures++; $display("FAIL reset seed %h", first); end
    checks++;
    if (mism != 0) begin failures++; $display("FAIL %0d states differ from the reference", mism); end
    checks++;
    if (zeros != 0) begin failures++; $display("FAIL zero state reached"); end
    checks++;
    if (period != 32767) begin failures++; $display("FAIL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
