// event_counter: one binary rate counter per channel for monitoring, read
// out over SPI.
//
// Each counter adds one for every event its channel's event generator
// builds and wraps around at 2^W. A snapshot register copies all counters
// every cycle while freeze is low; freeze (SPI chip select active,
// synchronised to SYS_CLK by the caller) holds it so that the SPI shift
// register, clocked by SCLK, loads stable values. The 32 counters of 12 bits
// follow the chip description; wrapping, the snapshot and the freeze are
// this design's choices. Snapshot latency: one cycle.
module event_counter #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] hit_pulse,
  input  logic         freeze,
  output logic [W-1:0] snapshot [N]
);
  logic [W-1:0] cnt [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        cnt[i]      <= '0;
        snapshot[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (hit_pulse[i]) cnt[i] <= cnt[i] + 1'b1;
        if (!freeze)      snapshot[i] <= cnt[i];
      end
    end
  end
endmodule
