// prbs_gen: pseudo-random data source for link tests. In PRBS mode the
// frame generator fills frames with its words instead of detector events,
// so that the receiver can check every bit of the link.
//
// A PRBS-31 generator (x^31 + x^28 + 1, seed all ones) advances W bit
// steps at once whenever `next` is high, and data is the last W bits it
// produced, newest bit in the LSB. The generator is named by the chip
// description; the polynomial, the word width and the seed are this
// design's choices. One word per cycle, show-ahead: data holds the first
// word from reset and the following word from the cycle after next.
module prbs_gen #(
  parameter int unsigned W = 48
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         next,
  output logic [W-1:0] data
);
  logic [30:0] lfsr;

  function automatic logic [W+30:0] advance(logic [30:0] s);
    logic [30:0]  st;
    logic [W-1:0] out;
    st  = s;
    out = '0;
    for (int i = 0; i < W; i++) begin
      automatic logic b = st[30] ^ st[27];
      st  = {st[29:0], b};
      out = {out[W-2:0], b};
    end
    return {st, out};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {lfsr, data} <= advance('1);
    end else if (next) begin
      {lfsr, data} <= advance(lfsr);
    end
  end
endmodule
