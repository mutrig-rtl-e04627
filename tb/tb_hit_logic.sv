// tb_hit_logic: checks the combined hit signal against the expected trace
// of a hit: rising at the timing-trigger edge, low while the energy trigger
// is high, rising again at the energy-trigger falling edge, and a single
// pulse for a hit below the energy threshold. Counts the rising edges the
// TDC would see.
module tb_hit_logic;
  logic t, e, hit;
  int checks = 0, failures = 0;
  int rises = 0;

  hit_logic dut (.t_trig(t), .e_trig(e), .hit);

  always @(posedge hit) rises++;

  task automatic step(logic tt, logic ee, logic exp, string what);
    t = tt; e = ee;
    #10;
    checks++;
    if (hit !== exp) begin
      failures++;
      $display("FAIL %s: t=%b e=%b hit=%b expected %b", what, tt, ee, hit, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t = 0; e = 0; #10;
    // large pulse: T up, E up, E down, T down
    step(0, 0, 0, "idle");
    step(1, 0, 1, "timing edge");
    step(1, 1, 0, "energy above threshold");
    step(1, 0, 1, "energy falling edge");
    step(0, 0, 0, "end of pulse");
    checks++;
    if (rises != 2) begin failures++; $display("FAIL large pulse gave %0d rising edges", rises); end
    // small pulse: never crosses the energy threshold
    rises = 0;
    step(1, 0, 1, "small pulse");
    step(0, 0, 0, "small pulse end");
    checks++;
    if (rises != 1) begin failures++; $display("FAIL small pulse gave %0d rising edges", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
