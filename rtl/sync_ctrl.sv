// sync_ctrl: sync module, the sleep / wake-up scheduler of the node.
//
// It is the only module that keeps running while the node sleeps. It counts
// ticks of the B frequency and alternates two phases:
//   WAKE  : awake = 1. The other modules, the A frequency and the external
//           devices (radio, sensor) are enabled for one communication cycle.
//           The phase ends when data processing reports the cycle done
//           (its packet was acknowledged) or when wake_ticks B ticks have
//           passed without that (a failed cycle).
//   SLEEP : awake = 0. Everything but this module and the B divider is
//           stopped for sleep_len B ticks, then the node wakes again.
// The node wakes right after reset, so the network can be joined at once.
//
// Schedule update: the first sleep time is cfg_sleep_ticks. Every
// acknowledgment that carries a sleep time (sched_valid from data
// processing) replaces it, so all nodes that hear the same acknowledging
// node adopt the same sleep time; because a node falls asleep on the tick
// at which the acknowledgment is processed, their next wake-ups are aligned
// to the reception of that same packet, in the spirit of receiver-receiver
// (reference broadcast) synchronisation. sleep_len shows the time in use,
// and data processing sends it out in its own acknowledgments.
//
// Counters: cycles counts wake-ups, ok_cycles those that ended with an
// acknowledgment.
//
// From the published design: the sleep / wake-up phases, only sync running in sleep,
// the update of the times after each acknowledgment, sleep time set by the
// application, B frequency. The way the times are carried and aligned is
// this design's reading of the receiver-receiver scheme.
module sync_ctrl
  import wsn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,          // B frequency strobe
  input  logic [TIME_W-1:0] cfg_sleep_ticks,
  input  logic [TIME_W-1:0] cfg_wake_ticks,
  input  logic              cycle_done,
  input  logic              sched_valid,
  input  logic [TIME_W-1:0] sched_sleep,
  output logic              awake,
  output logic [TIME_W-1:0] sleep_len,
  output logic [15:0]       cycles,
  output logic [15:0]       ok_cycles
);

  typedef enum logic {PH_SLEEP, PH_WAKE} phase_e;

  phase_e            phase;
  logic [TIME_W-1:0] cnt;
  logic [TIME_W-1:0] sleep_q;
  logic              have_sched;

  assign awake     = (phase == PH_WAKE);
  assign sleep_len = have_sched ? sleep_q : cfg_sleep_ticks;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= PH_WAKE;
      cnt        <= '0;
      sleep_q    <= '0;
      have_sched <= 1'b0;
      cycles     <= 16'd1;
      ok_cycles  <= '0;
    end else if (tick) begin
      if (sched_valid) begin
        sleep_q    <= sched_sleep;
        have_sched <= 1'b1;
      end
      unique case (phase)
        PH_WAKE: begin
          if (cycle_done || cnt + 1'b1 >= cfg_wake_ticks) begin
            cnt   <= '0;
            phase <= PH_SLEEP;
            if (cycle_done) ok_cycles <= ok_cycles + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PH_SLEEP: begin
          if (cnt + 1'b1 >= sleep_len) begin
            cnt    <= '0;
            phase  <= PH_WAKE;
            cycles <= cycles + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: phase <= PH_WAKE;
      endcase
    end
  end

endmodule
