// tb_test_controller: runs a sweep through the controller with the
// phase detector, the stimulus zero-crossing detector and the
// multiplier-accumulator replaced by simple responders:
//   - the "phase detector" answers 20 cycles after pd_start with a delay
//     that depends on the FCW (0, 1, 2, ... so that a zero delay occurs),
//   - ref_rise pulses every 50 cycles,
//   - the "accumulator" answers 2^L cycles after ora_start with a value
//     that encodes the FCW and the delay.
// Checked: the FCW sequence, the settle wait before each phase test, that
// DDS2 is held in reset exactly through cycle t0+delay (t0 = first
// ref_rise after the phase result) and released afterwards with the
// stimulus phase of cycle t0 as its start phase, that the
// accumulation window opens exactly at t0+delay+3, that each result is
// held until acknowledged however long the host waits (stall) and carries
// the right values (including theta = delay*FCW mod 2^L), and that the sweep ends with sweep_done.
module tb_test_controller;
  localparam int L = 10, W = 8, ACC_W = 33;

  logic clk = 0, rst_n = 0;
  logic start_sweep = 0, result_ack = 0;
  logic [L-1:0] fcw_start = 10'd2, fcw_step = 10'd4, fcw_stop = 10'd30, settle = 10'd37;
  logic busy, sweep_done, result_valid, result_timeout;
  logic [L-1:0] result_fcw, result_delay, result_theta, fcw, pd_delay;
  logic signed [ACC_W-1:0] result_amp, ora_result;
  logic dds1_clear, dds2_clear, pd_start, pd_done, pd_timeout, ref_rise;
  logic ora_start, ora_done;
  logic [W-1:0] ref_phase, dds2_start_phase;
  int exp_phase = -1;

  int checks = 0, failures = 0;
  int cyc = 0;

  test_controller #(.L(L), .W(W), .ACC_W(ACC_W), .RESTART_LAT(3)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("cycle %0d: %s", cyc, msg);
    end
  endtask

  function automatic int delay_of(int f);
    return (f / 4) % 5;   // 0,1,2,3,4,...
  endfunction

  // Responders and monitor, evaluated mid-cycle.
  int pd_due = -1, ora_due = -1, t0 = -1, exp_start = -1, fcw_set_cyc = 0;
  int cur_delay = 0, last_fcw = -1, stalls = 0, zero_delays = 0;
  bit waiting_ref = 0, in_window = 0;

  initial begin
    pd_done = 0; pd_timeout = 0; pd_delay = '0; ref_rise = 0;
    ora_done = 0; ora_result = '0;
  end

  always @(negedge clk) begin
    ref_rise = (cyc % 50 == 0);
    ref_phase = W'(cyc * 7);
    pd_done  = (cyc == pd_due);
    ora_done = (cyc == ora_due);
    if (rst_n) begin
      if (int'(fcw) != last_fcw) begin
        last_fcw = int'(fcw);
        fcw_set_cyc = cyc;
      end
      if (pd_start) begin
        check(cyc - fcw_set_cyc >= int'(settle), "phase test before settle time");
        pd_due    = cyc + 20;
        cur_delay = delay_of(int'(fcw));
        pd_delay  = L'(cur_delay);
      end
      if (pd_done) waiting_ref = 1;
      else if (waiting_ref && ref_rise) begin
        waiting_ref = 0;
        t0 = cyc;
        exp_start = t0 + cur_delay + 3;
        exp_phase = int'(ref_phase);
        if (cur_delay == 0) zero_delays++;
      end
      // DDS2 reset: held through t0+delay, released from t0+delay+1.
      if (t0 >= 0 && cyc >= t0 && cyc <= t0 + cur_delay)
        check(dds2_clear, "DDS2 released too early");
      if (t0 >= 0 && cyc == t0 + cur_delay + 1) begin
        check(!dds2_clear, "DDS2 not released");
        check(int'(dds2_start_phase) == exp_phase, "DDS2 start phase not the stimulus phase at the edge");
      end
      if (ora_start) begin
        check(cyc == exp_start, $sformatf("window opened at %0d, expected %0d", cyc, exp_start));
        ora_due    = cyc + (1 << L);
        ora_result = ACC_W'(int'(fcw) * 1000 + cur_delay);
        in_window  = 1;
      end
      if (!in_window && !(t0 >= 0 && cyc > t0 + cur_delay))
        check(dds2_clear, "DDS2 running outside the amplitude test");
      if (ora_done) begin
        in_window = 0;
        t0 = -1;
      end
    end
  end

  initial begin
    int n, wait_cycles, expected_fcw;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !result_valid, "not idle after reset");
    start_sweep = 1;
    @(negedge clk);
    start_sweep = 0;
    check(dds1_clear, "DDS1 not restarted at sweep start");
    n = 0;
    expected_fcw = 2;
    while (!sweep_done) begin
      @(negedge clk);
      if (result_valid) begin
        check(int'(result_fcw) == expected_fcw, $sformatf("result fcw %0d expected %0d", result_fcw, expected_fcw));
        check(int'(result_delay) == delay_of(expected_fcw), "result delay");
        check(int'(result_theta) == (delay_of(expected_fcw) * expected_fcw) % (1 << L), "result phase shift");
        check(result_amp == ACC_W'(expected_fcw * 1000 + delay_of(expected_fcw)), "result amplitude");
        // Keep the host busy for a while: the result must stay put.
        wait_cycles = (n % 3) * 40;
        repeat (wait_cycles) begin
          @(negedge clk);
          stalls++;
          check(result_valid && int'(result_fcw) == expected_fcw, "result lost while host busy");
        end
        result_ack = 1;
        @(negedge clk);
        result_ack = 0;
        n++;
        expected_fcw += 4;
      end
    end
    check(n == 8, $sformatf("%0d results, expected 8", n));
    check(!busy, "busy after sweep end");
    check(stalls > 0, "host stall never happened");
    check(zero_delays > 0, "zero delay never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
