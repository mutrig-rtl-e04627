// group_arbiter: merges the outputs of the four L1 FIFOs into the L2 FIFO.
//
// Round robin over the groups, starting one past the group served last,
// with a registered output stage (a skid-free pipeline register that accepts
// a new event whenever it is empty or being emptied). The register breaks
// the combinational path from the L2 FIFO full flag back to the L1 FIFOs.
// N = 4 groups follows the chip's 32 channels in groups of eight; the policy
// and the output register are this design's choices. Latency: one cycle.
module group_arbiter
  import mutrig_pkg::*;
#(
  parameter int unsigned N = N_GROUPS
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

  logic [IW-1:0] last, sel;
  logic          any, take;

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
    take = any && (!out_valid || out_ready);
    for (int unsigned i = 0; i < N; i++)
      in_ready[i] = take && (sel == IW'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last      <= IW'(N - 1);
      out_valid <= 1'b0;
      out_ev    <= '0;
    end else begin
      if (take) begin
        last      <= sel;
        out_valid <= 1'b1;
        out_ev    <= in_ev[sel];
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule
