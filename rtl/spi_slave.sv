// spi_slave: serial interface used to write the chip configuration and to
// read the per-channel event counters.
//
// SPI mode 0, MSB first: sdi is sampled and the register shifted on the
// rising edge of sclk while cs_n is low. A transfer is L bits long. At the
// first rising edge of a transfer the shift register takes rd_data (event
// counter snapshot) instead of its old content, so sdo presents
// rd_data[L-1] before the first edge and the following bits after each
// rising edge, while the new configuration shifts in through sdi. cs_n high
// resets the bit counter; the control register takes shreg on the rising
// edge of cs_n. The SPI itself follows the chip description; the mode, the
// bit order and the read/write-in-one-transfer scheme are this design's
// choices. rd_data must be stable from cs_n falling to the first sclk edge.
module spi_slave #(
  parameter int unsigned L = 544
) (
  input  logic         sclk,
  input  logic         cs_n,
  input  logic         sdi,
  output logic         sdo,
  input  logic [L-1:0] rd_data,
  output logic [L-1:0] shreg
);
  logic started;   // at least one edge in this transfer

  always_ff @(posedge sclk or posedge cs_n) begin
    if (cs_n) begin
      started <= 1'b0;
    end else begin
      started <= 1'b1;
      shreg   <= started ? {shreg[L-2:0], sdi} : {rd_data[L-2:0], sdi};
    end
  end

  assign sdo = started ? shreg[L-1] : rd_data[L-1];
endmodule
