// phase_detector: measures the delay between the reference tone and the
// device response, and holds it in the phase-response register (ORA1).
//
// The timing reference of each signal is the rising edge of its MSB: the
// MSB of an offset-binary sample is the sign of the sine, a square wave
// with the tone's frequency and phase. After start, the detector waits for
// a rising MSB edge of the reference tone (the stimulus crossing zero
// upwards), then counts clock cycles until the first rising MSB edge of
// the device output (the ADC code crossing mid-code). The count is the
// delay; the phase shift is theta = 2*pi * delay * FCW / 2^L. It is
// latched into the phase register, which keeps it until the next
// measurement completes.
//
// Hysteresis: near a zero crossing the MSB can toggle several times (the
// delta-sigma dither moves the synthesizer phase back and forth by a few
// steps, and the ADC adds its own noise), which would create false rising
// edges at downward crossings. An edge therefore counts only if the code
// has been below mid-code - HYST since the previous counted edge. The
// instant of an edge is still the MSB transition.
//
// If no reference edge arrives, or no response edge within 2^CNT_W - 1
// cycles of it, the measurement ends with timeout set and a delay of zero.
//
// Interface: ref_code and meas_code are the D-bit stimulus sample and ADC
// code. start is a one-cycle pulse; done pulses for one cycle when
// delay/timeout are updated. ref_rise (combinational) flags each counted
// reference edge, also outside a measurement; the test controller uses it
// to time the restart of the second synthesizer.
//
// Timing: an edge is flagged in the cycle its MSB becomes 1. A response
// edge in the same cycle as the reference edge gives delay 0. done follows
// the response edge by one clock.
//
// The MSB-based measurement and the register follow the document; the
// hysteresis, the cycle-count representation, the timeout and the
// handshake are this design's choices.
module phase_detector #(
  parameter int CNT_W = 16,  // delay counter width; default L
  parameter int D     = 8,   // sample width
  parameter int HYST  = 4    // re-arm threshold below mid-code, in codes
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [D-1:0]     ref_code,
  input  logic [D-1:0]     meas_code,
  output logic             ref_rise,
  output logic             done,
  output logic             timeout,
  output logic [CNT_W-1:0] delay
);

  localparam logic [D-1:0] REARM = D'(2 ** (D - 1) - HYST);

  typedef enum logic [1:0] {PD_IDLE, PD_WAIT_REF, PD_COUNT} pd_state_e;

  pd_state_e        state;
  logic             ref_armed, meas_armed, meas_rise;
  logic [CNT_W-1:0] cnt;

  assign ref_rise  = ref_armed  & ref_code[D-1];
  assign meas_rise = meas_armed & meas_code[D-1];

  // Edge qualifiers with hysteresis.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_armed  <= 1'b0;
      meas_armed <= 1'b0;
    end else begin
      if (ref_rise)               ref_armed <= 1'b0;
      else if (ref_code < REARM)  ref_armed <= 1'b1;
      if (meas_rise)              meas_armed <= 1'b0;
      else if (meas_code < REARM) meas_armed <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= PD_IDLE;
      cnt     <= '0;
      done    <= 1'b0;
      timeout <= 1'b0;
      delay   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        PD_IDLE: begin
          cnt <= '0;
          if (start) state <= PD_WAIT_REF;
        end
        PD_WAIT_REF: begin
          if (ref_rise && meas_rise) begin
            state   <= PD_IDLE;
            delay   <= '0;
            timeout <= 1'b0;
            done    <= 1'b1;
          end else if (ref_rise) begin
            state <= PD_COUNT;
            cnt   <= CNT_W'(1);
          end else if (cnt == '1) begin
            state   <= PD_IDLE;
            delay   <= '0;
            timeout <= 1'b1;
            done    <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PD_COUNT: begin
          if (meas_rise) begin
            state   <= PD_IDLE;
            delay   <= cnt;
            timeout <= 1'b0;
            done    <= 1'b1;
          end else if (cnt == '1) begin
            state   <= PD_IDLE;
            delay   <= '0;
            timeout <= 1'b1;
            done    <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= PD_IDLE;
      endcase
    end
  end

endmodule
