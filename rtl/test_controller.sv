// test_controller: sequences the frequency sweep of the response BIST.
//
// For every test tone, from fcw_start in steps of fcw_step up to fcw_stop,
// it
//   1. sets the tone's FCW on both synthesizers and waits settle cycles so
//      the device under test reaches steady state,
//   2. runs the phase detector, which returns the response delay in clock
//      cycles (the phase shift theta),
//   3. on the next upward zero crossing of the stimulus (ref_rise)
//      captures the phase of the stimulus sample (ref_phase) as DDS2's
//      start phase, holds the second synthesizer (DDS2) in reset for that
//      many cycles and then releases it, so DDS2 produces the stimulus
//      delayed by theta, i.e. in phase with the device response,
//   4. opens the 2^L-cycle window of the multiplier-accumulator and waits
//      for its sum, the amplitude response,
//   5. presents FCW, delay, the phase shift theta = delay*FCW mod 2^L (in
//      units of 2*pi/2^L), the timeout flag and the amplitude as a result,
//      and stalls until the host acknowledges it.
// If the phase detector times out (no zero crossings, as for FCW = 0),
// step 3 is skipped and DDS2 starts at once.
// DDS2 stays in reset whenever it is not generating the reference, and
// both synthesizers are restarted from phase zero when a sweep starts.
//
// Alignment: DDS2 presents the sample of its start phase RESTART_LAT = 3
// clocks after the last cycle of its reset, so the ADC samples reach the
// multiplier through a matching 3-stage delay line (in the top level).
// With the reset held through cycle t0+delay, where t0 is the cycle of
// the stimulus edge, DDS2 repeats the stimulus sample of cycle t0 exactly
// when the ADC sample taken delay cycles after t0 (where the detector saw
// the response edge) reaches the multiplier. This lets delay = 0 work
// without look-ahead. Starting DDS2 from the captured stimulus phase
// rather than from zero removes the up-to-one-step phase error that the
// stimulus has at the sample where its edge is detected.
//
// Interface: start_sweep and result_ack are one-cycle pulses from the
// host interface; busy is high from start until the sweep ends, sweep_done
// is set at the end and cleared by the next start. FCW, settle and delay
// are L bits wide.
//
// The order phase test, DDS2 reset-and-delay, amplitude test, next tone
// and the power-of-two FCW step follow the document; the settle wait, the
// sweep limits, the host handshake, the captured start phase and the
// delay-line alignment are this design's choices.
module test_controller
  import bist_pkg::*;
#(
  parameter int L           = 16,
  parameter int W           = 10,
  parameter int ACC_W       = 33,
  parameter int RESTART_LAT = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host side
  input  logic                    start_sweep,
  input  logic [L-1:0]            fcw_start,
  input  logic [L-1:0]            fcw_step,
  input  logic [L-1:0]            fcw_stop,
  input  logic [L-1:0]            settle,
  input  logic                    result_ack,
  output logic                    busy,
  output logic                    sweep_done,
  output logic                    result_valid,
  output logic [L-1:0]            result_fcw,
  output logic [L-1:0]            result_delay,
  output logic [L-1:0]            result_theta,
  output logic                    result_timeout,
  output logic signed [ACC_W-1:0] result_amp,
  // synthesizers
  output logic [L-1:0]            fcw,
  output logic                    dds1_clear,
  output logic                    dds2_clear,
  output logic [W-1:0]            dds2_start_phase,
  input  logic [W-1:0]            ref_phase,
  // phase detector (ORA1)
  output logic                    pd_start,
  input  logic                    pd_done,
  input  logic                    pd_timeout,
  input  logic [L-1:0]            pd_delay,
  input  logic                    ref_rise,
  // multiplier-accumulator (ORA2)
  output logic                    ora_start,
  input  logic                    ora_done,
  input  logic signed [ACC_W-1:0] ora_result
);

  typedef enum logic [3:0] {
    S_IDLE, S_SETTLE, S_PHASE, S_ALIGN, S_HOLD, S_RUN, S_ACCUM, S_RESULT
  } ctrl_state_e;

  ctrl_state_e state;
  logic [L-1:0] cnt;
  logic [L:0]   fcw_next;

  assign fcw_next = {1'b0, fcw} + {1'b0, fcw_step};

  // DDS2 runs only between the end of its delay and the end of the window.
  assign dds2_clear = !(state == S_RUN || state == S_ACCUM);
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      cnt            <= '0;
      fcw              <= '0;
      dds2_start_phase <= '0;
      dds1_clear     <= 1'b1;
      pd_start       <= 1'b0;
      ora_start      <= 1'b0;
      sweep_done     <= 1'b0;
      result_valid   <= 1'b0;
      result_fcw     <= '0;
      result_delay   <= '0;
      result_theta   <= '0;
      result_timeout <= 1'b0;
      result_amp     <= '0;
    end else begin
      dds1_clear <= 1'b0;
      pd_start   <= 1'b0;
      ora_start  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start_sweep) begin
            fcw        <= fcw_start;
            dds1_clear <= 1'b1;
            sweep_done <= 1'b0;
            cnt        <= settle;
            state      <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          if (cnt == '0) begin
            pd_start <= 1'b1;
            state    <= S_PHASE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_PHASE: begin
          if (pd_done) begin
            result_delay   <= pd_delay;
            result_timeout <= pd_timeout;
            // Without zero crossings (e.g. FCW = 0) there is nothing to
            // align to: the amplitude test runs with DDS2 undelayed.
            cnt              <= '0;
            dds2_start_phase <= '0;
            state            <= pd_timeout ? S_RUN : S_ALIGN;
          end
        end
        S_ALIGN: begin
          // Cycle t0: stimulus edge. DDS2 is in reset in this cycle.
          if (ref_rise) begin
            dds2_start_phase <= ref_phase;
            cnt   <= result_delay;
            state <= (result_delay == '0) ? S_RUN : S_HOLD;
          end
        end
        S_HOLD: begin
          // Cycles t0+1 .. t0+delay keep DDS2 in reset.
          if (cnt <= L'(1)) state <= S_RUN;
          cnt <= cnt - 1'b1;
          if (cnt <= L'(1)) cnt <= '0;
        end
        S_RUN: begin
          // DDS2 released; its phase-zero sample appears RESTART_LAT
          // clocks after the last reset cycle; ora_start is registered, so
          // it is raised one clock early to open the window on that sample.
          if (cnt == L'(RESTART_LAT - 2)) begin
            ora_start <= 1'b1;
            state     <= S_ACCUM;
          end
          cnt <= cnt + 1'b1;
        end
        S_ACCUM: begin
          if (ora_done) begin
            result_amp   <= ora_result;
            result_theta <= L'(result_delay * fcw);
            result_fcw   <= fcw;
            result_valid <= 1'b1;
            state        <= S_RESULT;
          end
        end
        S_RESULT: begin
          // Stall until the host has taken the result.
          if (result_ack) begin
            result_valid <= 1'b0;
            if (fcw_step == '0 || fcw_next > {1'b0, fcw_stop}) begin
              sweep_done <= 1'b1;
              state      <= S_IDLE;
            end else begin
              fcw   <= fcw_next[L-1:0];
              cnt   <= settle;
              state <= S_SETTLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
