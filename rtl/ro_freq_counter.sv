`timescale 1ps/1fs
// ro_freq_counter: measures the frequency of one ring oscillator by counting
// its rising edges during a window of WINDOW_CYCLES reference-clock cycles.
//
// The measured frequency tells how fast the silicon in the oscillator's grid
// is; the skew-assignment software turns the counts into per-grid delay
// corrections. The architecture only asks for the oscillator frequency to be
// measured; the circuit below is this implementation's.
//
// How it works. A measurement runs through four states in the reference
// domain (clk):
//   IDLE   waiting for start; the oscillator is off.
//   CLEAR  SETTLE_CYCLES cycles: the oscillator is enabled and the edge
//          counter is held at zero.
//   GATE   WINDOW_CYCLES cycles: the counter counts oscillator edges.
//   HOLD   SETTLE_CYCLES cycles: counting has stopped; the count is then
//          copied to `count`, `done` pulses and the oscillator is switched off.
// The edge counter runs in the oscillator's own clock domain (ro_clk); the
// clear and gate levels reach it through two-flop synchronisers. Start and
// stop are delayed by the same synchroniser latency, so the count is
// WINDOW_CYCLES * T_clk / T_ro within one or two edges. The counter is stable
// when copied (the gate closed SETTLE_CYCLES reference cycles earlier), which
// requires the oscillator to be faster than the reference clock. It saturates
// at all ones instead of wrapping.
//
// Timing: busy rises at the clock edge that samples start and stays high for
// 2 * SETTLE_CYCLES + WINDOW_CYCLES cycles; at the edge where it falls,
// count is updated and done pulses for one cycle.
// A start while busy is ignored.
module ro_freq_counter #(
  parameter int unsigned WINDOW_CYCLES = 1024,
  parameter int unsigned COUNT_W       = 20,
  parameter int unsigned SETTLE_CYCLES = 4
) (
  input  logic               clk,
  input  logic               rst_n,    // synchronous, active low
  input  logic               start,
  input  logic               ro_clk,
  output logic               ro_en,
  output logic               busy,
  output logic               done,
  output logic [COUNT_W-1:0] count
);

  typedef enum logic [1:0] {IDLE, CLEAR, GATE, HOLD} state_t;

  localparam int unsigned TW = $clog2((WINDOW_CYCLES > SETTLE_CYCLES ?
                                       WINDOW_CYCLES : SETTLE_CYCLES) + 1);

  state_t            state;
  logic [TW-1:0]     timer;
  logic              clr_ref, gate_ref;
  // oscillator-domain synchronisers and edge counter
  logic [1:0]         clr_sync, gate_sync;
  logic [COUNT_W-1:0] ro_cnt;

  // ---------------- reference-clock domain ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= IDLE;
      timer    <= '0;
      clr_ref  <= 1'b0;
      gate_ref <= 1'b0;
      ro_en    <= 1'b0;
      done     <= 1'b0;
      count    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            state   <= CLEAR;
            timer   <= TW'(SETTLE_CYCLES - 1);
            ro_en   <= 1'b1;
            clr_ref <= 1'b1;
          end
        end
        CLEAR: begin
          if (timer == '0) begin
            state    <= GATE;
            timer    <= TW'(WINDOW_CYCLES - 1);
            clr_ref  <= 1'b0;
            gate_ref <= 1'b1;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        GATE: begin
          if (timer == '0) begin
            state    <= HOLD;
            timer    <= TW'(SETTLE_CYCLES - 1);
            gate_ref <= 1'b0;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        HOLD: begin
          if (timer == '0) begin
            state <= IDLE;
            count <= ro_cnt;
            done  <= 1'b1;
            ro_en <= 1'b0;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // ---------------- oscillator clock domain ----------------

  always_ff @(posedge ro_clk) begin
    clr_sync  <= {clr_sync[0], clr_ref};
    gate_sync <= {gate_sync[0], gate_ref};
    if (clr_sync[1]) begin
      ro_cnt <= '0;
    end else if (gate_sync[1] && ro_cnt != '1) begin
      ro_cnt <= ro_cnt + 1'b1;
    end
  end

  // done is a single-cycle pulse.
  a_done_pulse : assert property (@(posedge clk) disable iff (!rst_n)
                                  done |=> !done);

endmodule
