// tb_group_arbiter: four L1 FIFOs send numbered events under random
// back-pressure. Every event must arrive once, in order per source; when
// all sources request, grants must rotate through 0..3 so each gets one
// slot in four.
module tb_group_arbiter;
  import mutrig_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  logic in_valid [N], in_ready [N];
  event_t in_ev [N];
  logic out_valid, out_ready;
  event_t out_ev;
  int checks = 0, failures = 0;
  int sent [N], got [N];
  int last_src = -1, rot_bad = 0, full_load = 0;

  group_arbiter #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_ev, .out_valid, .out_ready, .out_ev);

  always #4 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sources: event tagged with source in channel, sequence in t.cc
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (in_valid[i] && in_ready[i]) begin
        sent[i]++;
        in_valid[i] <= 1'b0;
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 0; in_ev[i] = '0; sent[i] = 0; got[i] = 0;
    end
    out_ready = 0;
    #1 rst_n = 0; #10 rst_n = 1;
    // phase 1: random traffic, random ready
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      out_ready = ($urandom % 4) != 0;
      for (int i = 0; i < N; i++)
        if (!in_valid[i] && ($urandom % 3) == 0 && sent[i] < 300) begin
          in_valid[i] = 1;
          in_ev[i] = '0;
          in_ev[i].channel = 5'(i);
          in_ev[i].t.cc = 15'(sent[i]);
        end
    end
    // phase 2: all sources always requesting, ready always high
    out_ready = 1;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) if (!in_valid[i]) begin
        in_valid[i] = 1;
        in_ev[i] = '0;
        in_ev[i].channel = 5'(i);
        in_ev[i].t.cc = 15'(sent[i]);
      end
      full_load = 1;
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) in_valid[i] = 0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] != sent[i] || sent[i] < 100) begin
        failures++; $display("FAIL source %0d sent %0d got %0d", i, sent[i], got[i]);
      end
    end
    checks++;
    if (rot_bad != 0) begin failures++; $display("FAIL %0d grants out of rotation", rot_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid && out_ready) begin
    automatic int s = int'(out_ev.channel);
    checks++;
    if (int'(out_ev.t.cc) != got[s]) begin
      failures++; $display("FAIL source %0d event %0d arrived as %0d", s, got[s], out_ev.t.cc);
    end
    got[s]++;
    if (full_load && last_src >= 0 && s != (last_src + 1) % N) rot_bad++;
    last_src = s;
  end
endmodule
