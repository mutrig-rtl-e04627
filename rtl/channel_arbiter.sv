// channel_arbiter: picks one of the N event generators of a channel group
// and hands its event to the group's L1 FIFO.
//
// Round robin: the search for a requesting input starts one past the input
// granted last, so under full load every channel gets one slot in N. The
// grant is combinational; one event moves per cycle when out_ready is high,
// and in_ready is raised only for the granted input. N = 8 follows the chip's
// grouping of eight channels per arbiter; the round-robin policy is this
// design's choice.
module channel_arbiter
  import mutrig_pkg::*;
#(
  parameter int unsigned N = CH_PER_GROUP
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid [N],
  output logic   in_ready [N],
  input  event_t in_ev    [N],
  output logic   out_valid,
  input  logic   out_ready,
  output event_t out_ev
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;  // input granted last
  logic [IW-1:0] sel;
  logic          any;

  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      automatic int unsigned idx = (int'(last) + k) % N;
      if (!any && in_valid[idx]) begin
        any = 1'b1;
        sel = IW'(idx);
      end
    end
    out_valid = any;
    out_ev    = in_ev[sel];
    for (int unsigned i = 0; i < N; i++)
      in_ready[i] = any && out_ready && (sel == IW'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last <= IW'(N - 1);
    else if (any && out_ready)       last <= sel;
  end

  // A granted input is always one that requests.
  a_grant_valid : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> in_valid[sel]);
endmodule
