// bist_top: built-in self-test for measuring the frequency response
// (amplitude and phase) of an analog device through an existing DAC/ADC
// pair.
//
// DDS1 drives the DAC with a stepped-frequency sine tone T1. The device
// output is digitised by the ADC. For each tone the phase detector
// compares the sign (MSB) of T1 with the sign of the ADC samples and
// stores the delay in cycles (phase response, ORA1). Then DDS2, which
// produces the same tone, is restarted that many cycles after an upward
// zero crossing of T1, from the phase T1 had at that crossing, so its tone
// T2 is in phase with the response. T2 is
// made symmetrical by the level shifter and multiplied with the ADC
// samples; the products are summed over 2^L cycles (ORA2), giving a number
// proportional to the response amplitude. The test controller sweeps the
// FCW and hands each (FCW, delay, amplitude) triple to the host interface.
//
// Ports: clk/rst_n (active-low asynchronous reset); the host word bus
// (addr, wr_en, wr_data, rd_data, see host_interface); dac_data, the
// D-bit offset-binary stimulus for the DAC; adc_data, the D-bit
// offset-binary ADC code of the device output, sampled every clock. The
// DAC, the device under test and the ADC are outside this module.
//
// Timing: one sample per clock in both directions. The ADC samples reach
// the multiplier through a RESTART_LAT-stage delay line that matches the
// restart latency of DDS2 (see test_controller). A tone with even FCW
// takes settle + at most two tone periods + 2^L + a few cycles.
//
// Default sizes: 8-bit DAC/ADC and a 3rd-order modulator as in the
// document; L = 16 and W = 10 are this design's choices (the document
// gives neither).
module bist_top #(
  parameter int L = 16,  // FCW width; tone resolution f_clk / 2^L
  parameter int W = 10,  // phase accumulator and sine table address width
  parameter int D = 8,   // DAC/ADC resolution
  parameter int K = 3    // delta-sigma order
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [3:0]   addr,
  input  logic         wr_en,
  input  logic [31:0]  wr_data,
  output logic [31:0]  rd_data,
  output logic [D-1:0] dac_data,
  input  logic [D-1:0] adc_data
);

  localparam int ACC_W       = 2 * D + 1 + L;
  localparam int RESTART_LAT = 3;

  // host <-> controller
  logic                    start_sweep, result_ack, busy, sweep_done;
  logic                    result_valid, result_timeout;
  logic [L-1:0]            fcw_start, fcw_step, fcw_stop, settle;
  logic [L-1:0]            result_fcw, result_delay, result_theta;
  logic signed [ACC_W-1:0] result_amp;
  // synthesizers
  logic [L-1:0]            fcw;
  logic                    dds1_clear, dds2_clear;
  logic [D-1:0]            t1, t2_raw;
  logic [W-1:0]            phase1, phase1_q, dds2_start_phase;
  logic signed [D-1:0]     t2;
  // analysers
  logic                    pd_start, pd_done, pd_timeout, ref_rise;
  logic [L-1:0]            pd_delay;
  logic                    ora_start, ora_done, ora_busy;
  logic signed [ACC_W-1:0] ora_result;
  logic [D-1:0]            adc_dly [RESTART_LAT];

  host_interface #(.L(L), .ACC_W(ACC_W)) u_host (
    .clk, .rst_n, .addr, .wr_en, .wr_data, .rd_data,
    .start_sweep, .result_ack, .fcw_start, .fcw_step, .fcw_stop, .settle,
    .busy, .sweep_done, .result_valid, .result_fcw, .result_delay,
    .result_theta, .result_timeout, .result_amp
  );

  test_controller #(.L(L), .W(W), .ACC_W(ACC_W), .RESTART_LAT(RESTART_LAT)) u_ctrl (
    .clk, .rst_n,
    .start_sweep, .fcw_start, .fcw_step, .fcw_stop, .settle, .result_ack,
    .busy, .sweep_done, .result_valid, .result_fcw, .result_delay,
    .result_theta, .result_timeout, .result_amp,
    .fcw, .dds1_clear, .dds2_clear, .dds2_start_phase, .ref_phase(phase1_q),
    .pd_start, .pd_done, .pd_timeout, .pd_delay, .ref_rise,
    .ora_start, .ora_done, .ora_result
  );

  dds #(.L(L), .W(W), .D(D), .K(K)) u_dds1 (
    .clk, .rst_n, .clear(dds1_clear), .start_phase('0), .fcw,
    .sample(t1), .msb(), .phase(phase1)
  );

  dds #(.L(L), .W(W), .D(D), .K(K)) u_dds2 (
    .clk, .rst_n, .clear(dds2_clear), .start_phase(dds2_start_phase), .fcw,
    .sample(t2_raw), .msb(), .phase()
  );

  assign dac_data = t1;

  // Phase of DDS1 that produced the current stimulus sample t1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase1_q <= '0;
    else        phase1_q <= phase1;
  end

  phase_detector #(.CNT_W(L), .D(D), .HYST(4)) u_pd (
    .clk, .rst_n, .start(pd_start), .ref_code(t1),
    .meas_code(adc_data), .ref_rise, .done(pd_done),
    .timeout(pd_timeout), .delay(pd_delay)
  );

  level_shifter #(.D(D)) u_shift (
    .in  (t2_raw),
    .out (t2)
  );

  // ADC samples delayed to meet DDS2's restart latency.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RESTART_LAT; i++) adc_dly[i] <= '0;
    end else begin
      adc_dly[0] <= adc_data;
      for (int i = 1; i < RESTART_LAT; i++) adc_dly[i] <= adc_dly[i-1];
    end
  end

  mac_ora #(.L(L), .D(D), .ACC_W(ACC_W)) u_ora (
    .clk, .rst_n, .start(ora_start), .t2,
    .d(adc_dly[RESTART_LAT-1]), .busy(ora_busy), .done(ora_done),
    .result(ora_result)
  );

endmodule
