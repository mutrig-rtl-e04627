// tb_l2_fifo: random writes and reads against a queue model. Checks data
// order, the show-ahead read port, the fill count, and that the FIFO
// refuses writes exactly when DEPTH words are stored.
module tb_l2_fifo;
  localparam int W = 48, DEPTH = 256;
  logic clk = 0, rst_n = 1;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [8:0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, fulls = 0;

  l2_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_valid, .wr_ready, .wr_data, .rd_valid, .rd_ready, .rd_data, .count);

  always #4 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #10 rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      // bias: fill first, then drain, then mixed
      wr_valid = (c < 2000) ? ($urandom % 4 != 0) : (c < 4000) ? ($urandom % 4 == 0) : ($urandom % 2 == 0);
      rd_ready = (c < 2000) ? ($urandom % 4 == 0) : (c < 4000) ? ($urandom % 4 != 0) : ($urandom % 2 == 0);
      wr_data  = {$urandom, $urandom};
      #1;
      checks++;
      if (count != 9'(q.size()) || wr_ready != (q.size() < DEPTH) || rd_valid != (q.size() > 0)) begin
        failures++; $display("FAIL cycle %0d: count %0d model %0d", c, count, q.size());
      end
      if (q.size() == DEPTH) fulls++;
      if (rd_valid) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("FAIL data %h expected %h", rd_data, q[0]); end
      end
      @(posedge clk);
      if (rd_valid && rd_ready) void'(q.pop_front());
      if (wr_valid && wr_ready) q.push_back(wr_data);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
