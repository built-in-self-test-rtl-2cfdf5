// tb_noise_shaping: checks the 3rd-order noise shaping of the delta-sigma
// modulator at the synthesizer's default size (B = L-W = 6 bits, K = 3).
//
// The modulator is fed a constant input x and its output error
// e[n] = y[n] - x/2^B is recorded for N = 4096 clocks. A direct DFT gives
// the error power per frequency bin. For MASH 1-1-1 the error is shaped
// by (1 - z^-1)^3, a slope of 60 dB per decade, so the mean power per bin
// in the band below 0.02*f_clk must lie at least 50 dB under the mean in
// the band 0.25..0.5*f_clk (a first-order shaper would give about 30 dB,
// an unshaped error 0 dB). The error must also have zero mean over the
// run (within 4/N), i.e. the average phase step is exact. Several inputs
// are tested.
module tb_noise_shaping;
  localparam int B = 6, K = 3, N = 4096;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, clear = 0;
  logic [B-1:0] x = '0;
  logic signed [K:0] y;
  int checks = 0, failures = 0;

  sd_mash #(.B(B), .K(K), .OUT_W(K + 1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real e [N];
  real cos_t [N], sin_t [N];
  int  xs [3] = '{5, 13, 37};

  initial begin
    real mean, re, im, p, low, high, ratio_db;
    int  nlow, nhigh;
    for (int n = 0; n < N; n++) begin
      cos_t[n] = $cos(2.0 * PI * n / N);
      sin_t[n] = $sin(2.0 * PI * n / N);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (xs[i]) begin
      @(negedge clk); clear = 1; x = B'(xs[i]);
      @(negedge clk); clear = 0;
      @(posedge clk);   // first registered output after clear
      mean = 0.0;
      for (int n = 0; n < N; n++) begin
        @(posedge clk); #1;
        e[n] = real'(y) - real'(xs[i]) / real'(1 << B);
        mean += e[n];
      end
      low = 0.0; high = 0.0; nlow = 0; nhigh = 0;
      for (int k = 1; k <= N / 2; k++) begin
        re = 0.0; im = 0.0;
        for (int n = 0; n < N; n++) begin
          re += e[n] * cos_t[(k * n) % N];
          im -= e[n] * sin_t[(k * n) % N];
        end
        p = (re * re + im * im) / N;
        if (real'(k) / N < 0.02) begin low += p; nlow++; end
        if (real'(k) / N >= 0.25) begin high += p; nhigh++; end
      end
      low  = low / nlow + 1e-30;
      high = high / nhigh;
      ratio_db = 10.0 * $log10(low / high);
      $display("x=%0d: low band %0.1f dB below high band, mean error %f", xs[i], -ratio_db, mean / N);
      checks++;
      if (ratio_db > -50.0) begin
        failures++;
        $display("x=%0d: shaping only %0.1f dB", xs[i], -ratio_db);
      end
      checks++;
      if (mean > 4.0 || mean < -4.0) begin
        failures++;
        $display("x=%0d: mean error %f over %0d clocks", xs[i], mean / N, N);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
