// tb_control_reg: checks the reset defaults, then loads random patterns on
// the rising edge of cs_n and checks that every channel word and the global
// word are taken from the documented bit positions (global word in the low
// 32 bits, channel i above it at 32 + 16 i), and that nothing changes while
// cs_n stays low.
module tb_control_reg;
  import mutrig_pkg::*;
  logic cs_n = 1, rst_n = 1;
  logic [CFG_W-1:0] shreg = '0;
  ch_cfg_t  ch_cfg [N_CHANNELS];
  glb_cfg_t glb;
  int checks = 0, failures = 0;

  control_reg dut (.cs_n, .rst_n, .shreg, .ch_cfg, .glb_cfg(glb));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #10 rst_n = 1;
    chk(glb.short_mode == 0 && glb.ext_val_en == 0 && glb.prbs_mode == 0 && glb.e_timeout == 8'd32 && glb.win_width == 6'd1, "global defaults");
    for (int i = 0; i < N_CHANNELS; i++) chk(ch_cfg[i].enable && ch_cfg[i].dac == '0, $sformatf("channel %0d default", i));
    for (int n = 0; n < 20; n++) begin
      logic [CFG_W-1:0] p;
      glb_cfg_t prev;
      for (int i = 0; i < CFG_W; i += 32) p[i +: 32] = $urandom;
      prev = glb;
      #10 cs_n = 0;
      #10 shreg = p;
      #10;
      chk(glb == prev, "no change while selected");
      cs_n = 1;
      #10;
      chk(glb.short_mode == p[0] && glb.ext_val_en == p[1] && glb.win_offset == p[6:2] &&
          glb.win_width == p[12:7] && glb.prbs_mode == p[13] && glb.e_timeout == p[21:14],
          $sformatf("global word %h", p[31:0]));
      for (int i = 0; i < N_CHANNELS; i++)
        chk(ch_cfg[i].enable == p[32 + 16*i + 15] && ch_cfg[i].dac == p[32 + 16*i +: 15], $sformatf("channel %0d", i));
      // shreg changing while cs_n is high must not load
      shreg = ~p;
      #10;
      chk(glb.short_mode == p[0] && ch_cfg[7].dac == p[32 + 16*7 +: 15], "hold between transfers");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
