// tb_phase_detector: square-wave codes with a known period and delay stand
// in for the stimulus samples and the ADC output. Each downward transition
// chatters between 128 and 126 for six cycles, which toggles the MSB but
// stays above the re-arm level, so a detector without hysteresis would see
// false rising edges there. For a set of delays
// (0, 1, short, and almost a full period) the detector must return the
// delay in cycles as a single-cycle done pulse, and leave timeout low. A response that never toggles must end in a
// timeout with delay 0 after 2^CNT_W-1 cycles. ref_rise must pulse in the
// cycle of each rising reference edge.
module tb_phase_detector;
  localparam int CNT_W = 10;
  localparam int PERIOD = 200;

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] ref_code = 8'd50, meas_code = 8'd50;
  logic ref_rise, done, timeout;
  logic [CNT_W-1:0] delay;
  int checks = 0, failures = 0;
  int cyc = 0, dly = 0;
  bit meas_stuck = 0;

  phase_detector #(.CNT_W(CNT_W), .D(8), .HYST(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [7:0] wave(int c);
    int pos;
    pos = ((c % PERIOD) + PERIOD) % PERIOD;
    if (pos < PERIOD / 2) return 8'd200;
    if (pos < PERIOD / 2 + 6) return (pos % 2 == 1) ? 8'd128 : 8'd126;
    return 8'd50;
  endfunction

  // Stimulus: ref high during the first half of each period; meas is the
  // same wave delayed by dly cycles.
  always @(negedge clk) begin
    ref_code  <= wave(cyc);
    meas_code <= meas_stuck ? 8'd50 : wave(cyc - dly);
  end

  // ref_rise must flag exactly the true upward transitions.
  int rise_err = 0;
  always @(posedge clk) begin
    if (rst_n && cyc >= PERIOD && (ref_rise !== ((cyc % PERIOD) == 0))) rise_err++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int delays[5] = '{0, 1, 7, 60, 199};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (delays[i]) begin
      dly = delays[i];
      repeat (2 * PERIOD) @(posedge clk);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (!done) begin
        @(posedge clk);
        #1;
      end
      // done is a single-cycle pulse.
      @(posedge clk); #1;
      checks++;
      if (done) begin
        failures++;
        $display("done longer than one cycle");
      end
      checks++;
      if (int'(delay) != delays[i] || timeout) begin
        failures++;
        $display("delay %0d measured %0d timeout %0b", delays[i], delay, timeout);
      end
    end
    // Response stuck low: timeout.
    meas_stuck = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      @(posedge clk);
      #1;
    end
    checks++;
    if (!timeout || delay != '0) begin
      failures++;
      $display("no timeout on a stuck response");
    end
    checks++;
    if (rise_err != 0) begin
      failures++;
      $display("ref_rise wrong in %0d cycles", rise_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
