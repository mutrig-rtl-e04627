// l2_fifo: the second-level event FIFO between the group arbiter and the
// frame generator.
//
// A circular buffer of DEPTH words with read and write pointers one bit
// wider than the address, so full and empty are told apart. The read port
// is show-ahead: rd_data is the oldest word whenever rd_valid is high, and a
// cycle with rd_ready high removes it. count gives the fill level, which the
// frame generator uses to size a frame. The FIFO itself is named by the chip
// description; depth and read style are this design's choices.
module l2_fifo #(
  parameter int unsigned W     = 48,
  parameter int unsigned DEPTH = 256
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_valid,
  output logic                   wr_ready,
  input  logic [W-1:0]           wr_data,
  output logic                   rd_valid,
  input  logic                   rd_ready,
  output logic [W-1:0]           rd_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;

  assign count    = wptr - rptr;
  assign wr_ready = (count != (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_valid && wr_ready) wptr <= wptr + 1'b1;
      if (rd_valid && rd_ready) rptr <= rptr + 1'b1;
    end
  end

  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n)
    count <= (AW+1)'(DEPTH));
endmodule
