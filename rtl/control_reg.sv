// control_reg: chip configuration register, loaded from the SPI shift
// register at the end of each transfer.
//
// On the rising edge of cs_n the L shifted-in bits are split into 32
// channel words (enable bit and a 15-bit analog DAC field passed to the
// front end) followed by one 32-bit global word (short events, external
// validation and its window, PRBS mode, energy timeout). Reset loads the
// defaults: all channels enabled, DAC fields zero, full events, validation
// off, offset 0, width 1 tick, energy timeout 32 cycles. The register and
// the DAC configuration path follow the chip description; the layout and
// the defaults are this design's choices. The outputs are quasi-static and
// should be changed only while the readout is idle.
module control_reg
  import mutrig_pkg::*;
(
  input  logic              cs_n,
  input  logic              rst_n,
  input  logic [CFG_W-1:0]  shreg,
  output ch_cfg_t           ch_cfg [N_CHANNELS],
  output glb_cfg_t          glb_cfg
);
  localparam glb_cfg_t GLB_DEFAULT = '{
    spare: '0, e_timeout: 8'd32, prbs_mode: 1'b0, win_width: 6'd1,
    win_offset: 5'd0, ext_val_en: 1'b0, short_mode: 1'b0};

  always_ff @(posedge cs_n or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_CHANNELS; i++) ch_cfg[i] <= '{enable: 1'b1, dac: '0};
      glb_cfg <= GLB_DEFAULT;
    end else begin
      // channel 31 first (MSB), global word last (LSB)
      for (int i = 0; i < N_CHANNELS; i++)
        ch_cfg[i] <= ch_cfg_t'(shreg[GLB_CFG_W + i*CH_CFG_W +: CH_CFG_W]);
      glb_cfg <= glb_cfg_t'(shreg[GLB_CFG_W-1:0]);
    end
  end
endmodule
