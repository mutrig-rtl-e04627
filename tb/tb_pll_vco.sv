// tb_pll_vco: checks the time-base model. Over several reference periods
// the VCO stage outputs must walk through the 32 states of a 16-stage
// Johnson sequence in order, one state every REF_PERIOD/32 (48-49 ps), and
// the VCO clock (inverted last stage) must have the reference period and
// rise at the start of state 0.
module tb_pll_vco;
  localparam int PER = 1562;
  logic ref_clk = 0;
  logic [15:0] ph;
  logic vco_clk;
  int checks = 0, failures = 0;

  pll_vco #(.STAGES(16), .REF_PERIOD_PS(PER)) dut (.ref_clk, .vco_phase(ph), .vco_clk);

  always #(PER/2 * 1ps) ref_clk = ~ref_clk;

  function automatic logic [15:0] johnson(int s);
    logic [15:0] v = '0;
    if (s <= 16) for (int i = 0; i < s; i++) v[i] = 1'b1;
    else begin v = '1; for (int i = 0; i < s - 16; i++) v[i] = 1'b0; end
    return v;
  endfunction

  realtime last_rise = 0;
  int  vco_periods = 0;
  always @(posedge vco_clk) begin
    if (last_rise != 0) begin
      checks++;
      if ($realtime - last_rise < (PER - 1) * 1ps || $realtime - last_rise > (PER + 1) * 1ps) begin
        failures++;
        $display("FAIL vco period %0t", $realtime - last_rise);
      end
      vco_periods++;
    end
    last_rise = $realtime;
    #1ps;
    checks++;
    if (ph !== 16'h0000) begin failures++; $display("FAIL vco_clk rose in state %b", ph); end
  end

  initial begin
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge ref_clk);
    @(posedge ref_clk);
    for (int p = 0; p < 5; p++) begin
      for (int s = 0; s < 32; s++) begin
        // sample in the middle of each state
        #(((PER * s / 32 + PER * (s + 1) / 32) / 2 - (s == 0 ? 0 : (PER * (s - 1) / 32 + PER * s / 32) / 2)) * 1ps);
        checks++;
        if (ph !== johnson(s)) begin
          failures++;
          $display("FAIL period %0d state %0d: %b expected %b", p, s, ph, johnson(s));
        end
      end
      @(posedge ref_clk);
    end
    checks++;
    if (vco_periods < 4) begin failures++; $display("FAIL only %0d vco periods", vco_periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
