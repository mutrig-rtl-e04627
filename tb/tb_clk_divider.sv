// tb_clk_divider: measures the divided clock against a 640 MHz serial
// clock: period of five serial cycles (128 MHz), high for two and a half
// cycles, and one byte_rd pulse per period, one serial cycle long, at the
// third rising edge after the sys_clk rising edge.
module tb_clk_divider;
  localparam int HALF = 781;
  logic ser_clk = 0, rst_n = 1, sys_clk, byte_rd;
  int checks = 0, failures = 0;
  realtime t_rise = 0, t_fall = 0;
  int ser_edges = 0, last_sys_edge = -1, rd_edges = 0, periods = 0;

  clk_divider #(.DIV(5)) dut (.ser_clk, .rst_n, .sys_clk, .byte_rd);

  always #(HALF * 1ps) ser_clk = ~ser_clk;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  always @(posedge ser_clk) if (rst_n) begin
    ser_edges++;
    if (byte_rd) begin
      rd_edges++;
      if (last_sys_edge >= 0)
        chk(ser_edges - last_sys_edge == 3, $sformatf("byte_rd %0d edges after sys_clk", ser_edges - last_sys_edge));
    end
  end

  always @(posedge sys_clk) if (rst_n) begin
    if (t_rise > 0 && $realtime > 20ns) begin
      chk($realtime - t_rise > (10 * HALF - 2) * 1ps && $realtime - t_rise < (10 * HALF + 2) * 1ps, "sys_clk period");
      chk(t_fall - t_rise > (5 * HALF - 2) * 1ps && t_fall - t_rise < (5 * HALF + 2) * 1ps, "sys_clk high time");
      periods++;
    end
    t_rise = $realtime;
    last_sys_edge = ser_edges + 1;   // this edge is counted right after
  end
  always @(negedge sys_clk) t_fall = $realtime;

  initial begin
    #20us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ns rst_n = 0; #3ns rst_n = 1;
    #2us;
    chk(periods > 100, $sformatf("%0d periods", periods));
    chk(rd_edges >= periods && rd_edges <= periods + 4, $sformatf("byte_rd %0d for %0d periods", rd_edges, periods));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
