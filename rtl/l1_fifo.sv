// l1_fifo: first-level event buffer of one channel group, with the optional
// external validation that forwards only events close in time to an
// external trigger.
//
// Validation off: an ordinary FIFO; the writer is stalled when it is full
// and every event is read out.
//
// Validation on: the memory is a ring that is always written, the oldest
// event being overwritten. Every VAL_TICK_CYCLES (10) cycles the write
// pointer is recorded in an address table, so entry k holds the address of
// the first event written during tick k. A rising edge of the external
// trigger (synchronised with two flip-flops) in tick T defines a matching
// window from tick S = T - win_offset to tick E = S + win_width. Once the
// address of tick E has been recorded (at once if E <= T, else after E - T
// ticks), the start and stop addresses are read from the table, the read
// pointer jumps to the start and the events up to the stop address are
// read out. Offset and width are in ticks of 10 cycles (78 ns at 128 MHz)
// and are clamped to 16 and 32 ticks (1.25 us and 2.5 us).
//
// The ring buffer, the 10-cycle address table, the trigger lookup and the
// limits follow the chip description. The direction of the offset (back
// from the trigger), the table and buffer depths, ignoring a trigger that
// arrives while a window is still being read (trig_missed) and resetting the
// read pointer when the mode changes are this design's choices. Reads use a
// valid/ready handshake with a show-ahead data port.
module l1_fifo
  import mutrig_pkg::*;
#(
  parameter int unsigned DEPTH           = 128,
  parameter int unsigned TABLE_DEPTH     = 64,
  parameter int unsigned TICK_CYCLES     = VAL_TICK_CYCLES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ext_val_en,
  input  logic [4:0] win_offset,
  input  logic [5:0] win_width,
  input  logic       ext_trig,      // asynchronous
  input  logic       wr_valid,
  output logic       wr_ready,
  input  event_t     wr_ev,
  output logic       rd_valid,
  input  logic       rd_ready,
  output event_t     rd_ev,
  output logic       win_busy,      // a validation window is open or read
  output logic       trig_missed    // one-cycle pulse: trigger ignored
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned TW = $clog2(TABLE_DEPTH);
  localparam int unsigned PW = $clog2(TICK_CYCLES);

  typedef enum logic [1:0] {V_IDLE, V_WAIT, V_LOOKUP, V_READ} vstate_t;

  event_t        mem [DEPTH];
  logic [AW-1:0] addr_tab [TABLE_DEPTH];
  logic [AW:0]   wptr, rptr;
  logic [AW-1:0] stop_ptr;
  logic [PW-1:0] phase;
  logic [TW-1:0] tick_idx;        // next table entry to record
  logic [TW-1:0] s_tick, e_tick;
  logic [5:0]    wait_ticks;
  logic          val_q;
  logic [2:0]    trig_s;
  logic          trig_edge, tick_now;
  vstate_t       vstate;

  logic [4:0]    off_c;
  logic [5:0]    wid_c;
  logic [AW:0]   count;

  assign off_c     = (win_offset > 5'(WIN_OFFSET_MAX)) ? 5'(WIN_OFFSET_MAX) : win_offset;
  assign wid_c     = (win_width  > 6'(WIN_WIDTH_MAX))  ? 6'(WIN_WIDTH_MAX)  : win_width;
  assign trig_edge = trig_s[1] & ~trig_s[2];
  assign tick_now  = (phase == '0);
  assign count     = wptr - rptr;

  always_comb begin
    if (val_q != ext_val_en) begin
      // mode change in progress: the buffer is being dropped
      wr_ready = 1'b0;
      rd_valid = 1'b0;
    end else if (ext_val_en) begin
      wr_ready = 1'b1;
      rd_valid = (vstate == V_READ) && (rptr[AW-1:0] != stop_ptr);
    end else begin
      wr_ready = (count != (AW+1)'(DEPTH));
      rd_valid = (count != '0);
    end
    rd_ev    = mem[rptr[AW-1:0]];
    win_busy = (vstate != V_IDLE);
  end

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) mem[wptr[AW-1:0]] <= wr_ev;
    if (tick_now)             addr_tab[tick_idx] <= wptr[AW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr        <= '0;
      rptr        <= '0;
      stop_ptr    <= '0;
      phase       <= '0;
      tick_idx    <= '0;
      s_tick      <= '0;
      e_tick      <= '0;
      wait_ticks  <= '0;
      val_q       <= 1'b0;
      trig_s      <= '0;
      vstate      <= V_IDLE;
      trig_missed <= 1'b0;
    end else begin
      trig_s      <= {trig_s[1:0], ext_trig};
      trig_missed <= 1'b0;
      phase       <= (phase == PW'(TICK_CYCLES - 1)) ? '0 : phase + 1'b1;
      if (tick_now) tick_idx <= tick_idx + 1'b1;
      if (wr_valid && wr_ready) wptr <= wptr + 1'b1;
      if (rd_valid && rd_ready) rptr <= rptr + 1'b1;

      val_q <= ext_val_en;
      if (val_q != ext_val_en) begin
        // mode change: drop what is buffered
        rptr   <= wptr;
        vstate <= V_IDLE;
      end else if (ext_val_en) begin
        unique case (vstate)
          V_IDLE: if (trig_edge) begin
            // tick_idx - 1 is the tick in progress
            s_tick     <= tick_idx - 1'b1 - TW'(off_c);
            e_tick     <= tick_idx - 1'b1 - TW'(off_c) + TW'(wid_c);
            wait_ticks <= (wid_c > 6'(off_c)) ? wid_c - 6'(off_c) : '0;
            vstate     <= V_WAIT;
          end
          V_WAIT: begin
            if (wait_ticks == '0)  vstate <= V_LOOKUP;
            else if (tick_now)     wait_ticks <= wait_ticks - 1'b1;
          end
          V_LOOKUP: begin
            rptr     <= {1'b0, addr_tab[s_tick]};
            stop_ptr <= addr_tab[e_tick];
            vstate   <= V_READ;
          end
          V_READ: if (!rd_valid || (rd_ready && rptr[AW-1:0] + 1'b1 == stop_ptr))
            vstate <= V_IDLE;
          default: vstate <= V_IDLE;
        endcase
        if (trig_edge && vstate != V_IDLE) trig_missed <= 1'b1;
      end
    end
  end

  // The matching window never reaches further back than the table.
  initial assert (WIN_OFFSET_MAX + WIN_WIDTH_MAX < TABLE_DEPTH);
endmodule
