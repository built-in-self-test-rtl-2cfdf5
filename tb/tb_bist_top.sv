// tb_bist_top: end-to-end test of the frequency-response BIST at its
// default size (L = 16, W = 10, D = 8, K = 3), driven through the host
// register bus like a PC would drive it.
//
// The DAC, the device under test and the ADC are replaced by
// analog_path_model instances; the testbench can switch between
//   - a pure delay of 6 clocks (ALPHA = 1): the measured delay must be
//     exactly 6 cycles and the amplitude sum must be 127*127/2 * 2^16
//     within 1 %, i.e. the phase alignment of DDS2 is right,
//   - a first-order low-pass (ALPHA = 0.05) after 4 clocks of latency:
//     each result is compared with the model's transfer function
//     H = a z^-4 / (1 - (1-a) z^-1) at w = 2*pi*FCW/2^16 (amplitude
//     sum / (127*127/2 * 2^16) against |H| within 3 % and 0.01, delay
//     against -arg(H)/w within 2 cycles plus 1/500 of the period), and
//     the -3 dB point found from the sweep must lie within one FCW step
//     of the analytic corner,
//   - a stimulus of FCW = 0, which has no zero crossings and must end in
//     a phase-detector timeout with the sweep still completing.
// The host takes its time acknowledging some results, so the controller
// stalls. Each mechanism (phase measurement, delayed DDS2 restart,
// amplitude accumulation, host stall, timeout, sweep completion) is
// counted and a failure is counted for any that never happened.
module tb_bist_top;
  import bist_pkg::*;
  localparam int  L = 16, D = 8;
  localparam real PI = 3.14159265358979;
  localparam real FULL = 127.0 * 127.0 / 2.0 * 65536.0;
  localparam real A_LPF = 0.05;
  localparam int  LAT_LPF = 3;

  logic clk = 0, rst_n = 0;
  logic [3:0] addr = '0;
  logic wr_en = 0;
  logic [31:0] wr_data = '0, rd_data;
  logic [D-1:0] dac_data, adc_data, adc_delay, adc_lpf;
  int dut_sel = 0;

  bist_top dut (.*);

  analog_path_model #(.D(D), .LATENCY(5), .ALPHA(1.0)) u_delay (
    .clk, .dac_data, .adc_data(adc_delay));
  analog_path_model #(.D(D), .LATENCY(LAT_LPF), .ALPHA(A_LPF)) u_lpf (
    .clk, .dac_data, .adc_data(adc_lpf));

  assign adc_data = (dut_sel == 0) ? adc_delay : adc_lpf;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_phase = 0, n_hold = 0, n_amp = 0, n_stall = 0, n_timeout = 0, n_sweeps = 0;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic write(input reg_addr_e a, input logic [31:0] v);
    @(negedge clk);
    addr = a; wr_data = v; wr_en = 1;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic read(input reg_addr_e a, output logic [31:0] v);
    @(negedge clk);
    addr = a;
    #1;
    v = rd_data;
  endtask

  // One stored result.
  typedef struct {
    int      fcw;
    int      delay;
    int      theta;
    bit      timeout;
    longint  amp;
  } result_t;
  result_t res [$];

  // Runs one sweep and collects its results.
  task automatic sweep(input int f0, input int fstep, input int f1, input int settle);
    logic [31:0] st, v, hi;
    result_t r;
    int k;
    res.delete();
    write(REG_FCW_START, f0);
    write(REG_FCW_STEP, fstep);
    write(REG_FCW_STOP, f1);
    write(REG_SETTLE, settle);
    write(REG_CTRL, 32'h1);
    k = 0;
    forever begin
      read(REG_CTRL, st);
      if (st[STAT_VALID]) begin
        read(REG_RES_FCW, v);     r.fcw = int'(v);
        read(REG_RES_PHASE, v);   r.delay = int'(v);
        read(REG_RES_THETA, v);   r.theta = int'(v);
        r.timeout = st[STAT_TIMEOUT];
        read(REG_RES_AMP_LO, v);
        read(REG_RES_AMP_HI, hi);
        r.amp = longint'({hi, v});
        res.push_back(r);
        // Slow host on every other result: the controller must wait.
        if (k % 2 == 1) begin
          repeat (500) @(negedge clk);
          read(REG_CTRL, st);
          if (st[STAT_VALID] && st[STAT_BUSY]) n_stall++;
        end
        write(REG_CTRL, 32'h2);
        k++;
      end else if (st[STAT_DONE] && !st[STAT_BUSY]) begin
        n_sweeps++;
        break;
      end
    end
  endtask

  // Model transfer function at FCW f.
  function automatic real h_mag(real a, int f);
    real w, re, im;
    w  = 2.0 * PI * f / 65536.0;
    re = 1.0 - (1.0 - a) * $cos(w);
    im = (1.0 - a) * $sin(w);
    return a / $sqrt(re * re + im * im);
  endfunction

  function automatic real h_delay(real a, int lat, int f);
    real w, re, im;
    w  = 2.0 * PI * f / 65536.0;
    re = 1.0 - (1.0 - a) * $cos(w);
    im = (1.0 - a) * $sin(w);
    // arg(1/(1-(1-a)e^-jw)) = -atan2(im, re); total delay in cycles:
    return (lat + 1) + $atan2(im, re) / w;
  endfunction

  initial begin
    real ratio, ref_ratio, exp_dly, tol, first, f3db_meas, f3db_model;
    int  prev_fcw;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. Pure delay of 6 clocks.
    dut_sel = 0;
    sweep(2, 2048, 4098, 1024);
    check(res.size() == 3, $sformatf("pure delay: %0d results", res.size()));
    foreach (res[i]) begin
      ratio = real'(res[i].amp) / FULL;
      $display("delay  fcw=%5d delay=%0d amp=%0d ratio=%f", res[i].fcw, res[i].delay, res[i].amp, ratio);
      check(res[i].fcw == 2 + 2048 * i, "pure delay: result FCW");
      check(res[i].delay == 6 && !res[i].timeout, $sformatf("pure delay: fcw %0d measured %0d cycles", res[i].fcw, res[i].delay));
      check(ratio > 0.99 && ratio < 1.01, $sformatf("pure delay: fcw %0d amplitude ratio %f", res[i].fcw, ratio));
      check(res[i].theta == (res[i].delay * res[i].fcw) % 65536, "pure delay: theta register");
      if (!res[i].timeout) n_phase++;
      if (res[i].delay > 0) n_hold++;
      n_amp++;
    end

    // 2. First-order low-pass.
    dut_sel = 1;
    sweep(2, 128, 1026, 2048);
    check(res.size() == 9, $sformatf("low-pass: %0d results", res.size()));
    first = -1.0;
    f3db_meas = -1.0;
    prev_fcw = 0;
    foreach (res[i]) begin
      ratio     = real'(res[i].amp) / FULL;
      ref_ratio = h_mag(A_LPF, res[i].fcw);
      exp_dly   = h_delay(A_LPF, LAT_LPF, res[i].fcw);
      tol       = 2.0 + 65536.0 / res[i].fcw / 500.0;
      $display("lowpass fcw=%5d delay=%0d (model %f) theta=%0.1f deg ratio=%f (model %f)",
               res[i].fcw, res[i].delay, exp_dly, 360.0 * res[i].theta / 65536.0, ratio, ref_ratio);
      check(ratio - ref_ratio < 0.03 * ref_ratio + 0.01 && ref_ratio - ratio < 0.03 * ref_ratio + 0.01,
            $sformatf("low-pass: fcw %0d amplitude %f vs %f", res[i].fcw, ratio, ref_ratio));
      check(real'(res[i].delay) - exp_dly < tol && exp_dly - real'(res[i].delay) < tol,
            $sformatf("low-pass: fcw %0d delay %0d vs %f", res[i].fcw, res[i].delay, exp_dly));
      check(res[i].theta == (res[i].delay * res[i].fcw) % 65536, "low-pass: theta register");
      if (first < 0.0) first = ratio;
      if (f3db_meas < 0.0 && ratio < 0.7071 * first) f3db_meas = res[i].fcw;
      if (!res[i].timeout) n_phase++;
      if (res[i].delay > 0) n_hold++;
      n_amp++;
    end
    // Analytic corner relative to the first tone's response.
    f3db_model = -1.0;
    for (int f = 2; f <= 4096 && f3db_model < 0.0; f++)
      if (h_mag(A_LPF, f) < 0.7071 * h_mag(A_LPF, 2)) f3db_model = f;
    $display("-3 dB point: measured between FCW %0.0f - 128 and %0.0f, model %0.0f",
             f3db_meas, f3db_meas, f3db_model);
    check(f3db_meas >= f3db_model && f3db_meas - 128.0 < f3db_model + 1.0,
          "low-pass: -3 dB point not found where the model has it");

    // 3. No zero crossings: FCW = 0.
    sweep(0, 2, 0, 16);
    check(res.size() == 1 && res[0].timeout, "FCW 0 did not time out");
    if (res.size() == 1 && res[0].timeout) n_timeout++;

    $display("mechanisms: phase=%0d hold=%0d amplitude=%0d stall=%0d timeout=%0d sweeps=%0d",
             n_phase, n_hold, n_amp, n_stall, n_timeout, n_sweeps);
    check(n_phase > 0, "phase measurement never happened");
    check(n_hold > 0, "delayed DDS2 restart never happened");
    check(n_amp > 0, "amplitude accumulation never happened");
    check(n_stall > 0, "host stall never happened");
    check(n_timeout > 0, "phase-detector timeout never happened");
    check(n_sweeps == 3, "not every sweep completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
