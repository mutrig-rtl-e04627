// tb_event_counter: random hit pulses on 32 channels against a model;
// checks every snapshot value, that the snapshot holds while frozen even
// though counting goes on, and that a counter wraps after 4095.
module tb_event_counter;
  localparam int N = 32, W = 12;
  logic clk = 0, rst_n = 1, freeze = 0;
  logic [N-1:0] hit = '0;
  logic [W-1:0] snap [N];
  int model [N];
  int checks = 0, failures = 0, bad = 0;

  event_counter #(.N(N), .W(W)) dut (.clk, .rst_n, .hit_pulse(hit), .freeze, .snapshot(snap));

  always #4 clk = ~clk;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic compare(string m);
    bad = 0;
    for (int i = 0; i < N; i++) if (int'(snap[i]) != model[i] % (1 << W)) bad++;
    chk(bad == 0, $sformatf("%s: %0d counters differ", m, bad));
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) model[i] = 0;
    #1 rst_n = 0; #10 rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      repeat (100) begin
        @(negedge clk);
        hit = {$urandom, $urandom} >> ($urandom % 40);
        @(posedge clk);
        for (int i = 0; i < N; i++) if (hit[i]) model[i]++;
      end
      @(negedge clk) hit = '0;
      repeat (2) @(negedge clk);
      compare($sformatf("round %0d", r));
    end
    // frozen snapshot stays while counting continues
    begin
      automatic int held [N];
      freeze = 1;
      repeat (2) @(negedge clk);
      for (int i = 0; i < N; i++) held[i] = int'(snap[i]);
      repeat (50) begin
        @(negedge clk); hit = '1;
        @(posedge clk); for (int i = 0; i < N; i++) model[i]++;
      end
      @(negedge clk) hit = '0;
      bad = 0;
      for (int i = 0; i < N; i++) if (int'(snap[i]) != held[i]) bad++;
      chk(bad == 0, "snapshot held while frozen");
      freeze = 0;
      repeat (2) @(negedge clk);
      compare("after freeze");
    end
    // wrap-around on channel 5
    repeat (4200) begin
      @(negedge clk); hit = 32'h20;
      @(posedge clk); model[5]++;
    end
    @(negedge clk) hit = '0;
    repeat (2) @(negedge clk);
    compare("wrap");
    chk(model[5] > 4096, "channel 5 passed 4096");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
