// tb_prbs_gen: compares the generator's words with a bit-serial PRBS-31
// reference (b[n] = b[n-31] xor b[n-28], 31 ones before the first output)
// and checks that the first word is shown from reset and that the word
// holds while `next` is low.
module tb_prbs_gen;
  localparam int W = 48;
  logic clk = 0, rst_n = 1, next = 0;
  logic [W-1:0] data;
  bit b [$];
  int checks = 0, failures = 0;

  prbs_gen #(.W(W)) dut (.clk, .rst_n, .next, .data);

  always #4 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp, hold;
    for (int i = 0; i < 31; i++) b.push_back(1'b1);
    #1 rst_n = 0; #10 rst_n = 1;
    // the first word is shown from reset
    for (int i = 0; i < W; i++) b.push_back(b[b.size()-31] ^ b[b.size()-28]);
    for (int i = 0; i < W; i++) exp[i] = b[b.size()-1-i];
    checks++;
    if (data != exp) begin failures++; $display("FAIL first word %h expected %h", data, exp); end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      next = ($urandom % 3) != 0;
      hold = data;
      @(posedge clk); #1;
      if (next) begin
        for (int i = 0; i < W; i++) b.push_back(b[b.size()-31] ^ b[b.size()-28]);
        for (int i = 0; i < W; i++) exp[i] = b[b.size()-1-i];
        checks++;
        if (data != exp) begin failures++; $display("FAIL word %0d: %h expected %h", n, data, exp); end
      end else begin
        checks++;
        if (data != hold) begin failures++; $display("FAIL word changed without next"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
