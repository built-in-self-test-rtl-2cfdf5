// tb_dds: checks the delta-sigma DDS at its default size (L=16, W=10,
// D=8, K=3).
//
// For several FCWs (including ones with only low bits set, where the tone
// is produced entirely by the modulator) the synthesizer is restarted with
// clear from a different start phase p0 and run for 2^L cycles. Every
// cycle (phases taken relative to p0):
//   - the phase must stay within 4 table steps of the ideal
//     FCW*(n-1)/2^(L-W), n counting clocks after clear is released (the
//     phase first moves on the second clock),
//   - the sample must be the sine of the previous cycle's phase (+-1 code,
//     computed with $sin) and msb its top bit.
// After exactly 2^L cycles the tone has made FCW whole periods
// (frequency = FCW*f_clk/2^L): the phase must be back at p0 (within the
// same bound) and the net number of accumulator wrap-arounds must be FCW
// (or FCW-1 if the phase ends just below zero).
module tb_dds;
  localparam int L = 16, W = 10, D = 8, K = 3;
  localparam int B = L - W;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, clear = 1;
  logic [L-1:0] fcw = '0;
  logic [W-1:0] start_phase = '0;
  logic [D-1:0] sample;
  logic msb;
  logic [W-1:0] phase;
  int checks = 0, failures = 0;

  dds #(.L(L), .W(W), .D(D), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ideal_sample(int p);
    return int'($floor(128.0 + 127.0 * $sin(2.0 * PI * p / (1 << W)) + 0.5));
  endfunction

  function automatic int wrapdiff(longint a, longint b);
    longint d;
    d = (a - b) % (1 << W);
    if (d < 0) d += (1 << W);
    if (d >= (1 << (W - 1))) d -= (1 << W);
    return int'(d);
  endfunction

  int fcws[5] = '{2, 6, 64, 1000, 4096};

  initial begin
    int prev_phase, crossings, err, bad;
    longint ideal;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (fcws[i]) begin
      @(negedge clk); clear = 1; fcw = L'(fcws[i]); start_phase = W'(i * 300);
      @(negedge clk); clear = 0;
      prev_phase = (i * 300) % (1 << W); crossings = 0; bad = 0;
      for (int n = 1; n <= (1 << L); n++) begin
        @(posedge clk); #1;
        ideal = i * 300 + ((longint'(fcws[i]) * (n - 1)) >> B);
        err = wrapdiff(phase, ideal);
        if (err > 4 || err < -4) bad++;
        if (int'(sample) - ideal_sample(prev_phase) > 1 ||
            int'(sample) - ideal_sample(prev_phase) < -1 || msb != sample[D-1]) bad++;
        // Net number of phase wrap-arounds of the accumulator.
        if (prev_phase >= 3 * (1 << W) / 4 && int'(phase) < (1 << W) / 4) crossings++;
        if (int'(phase) >= 3 * (1 << W) / 4 && prev_phase < (1 << W) / 4) crossings--;
        prev_phase = int'(phase);
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("fcw=%0d: %0d cycles off the ideal phase/sample", fcws[i], bad);
      end
      // One more clock completes 2^L steps: the phase is back at p0.
      @(posedge clk);
      #1;
      checks++;
      err = wrapdiff(phase, i * 300);
      if (err > 4 || err < -4) begin
        failures++;
        $display("fcw=%0d: phase %0d after 2^L cycles", fcws[i], phase);
      end
      checks++;
      if (crossings != fcws[i] && crossings != fcws[i] - 1) begin
        failures++;
        $display("fcw=%0d: %0d periods", fcws[i], crossings);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
