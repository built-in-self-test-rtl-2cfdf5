// tb_sine_rom: reads every table entry and compares it with
// 128 + round(127*sin(2*pi*p/1024)) computed with the simulator's
// real-valued $sin (exactly, except where the value lies within 0.001 of
// a rounding tie), and checks the one-cycle read latency by
// changing the address every clock.
module tb_sine_rom;
  localparam int W = 10, D = 8;
  localparam real PI = 3.14159265358979;
  logic clk = 0;
  logic [W-1:0] phase = '0;
  logic [D-1:0] sample;
  int checks = 0, failures = 0;

  sine_rom #(.W(W), .D(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ideal(int p);
    return int'($floor(128.0 + 127.0 * $sin(2.0 * PI * p / (1 << W)) + 0.5));
  endfunction

  function automatic bit near_tie(int p);
    real v;
    v = 127.0 * $sin(2.0 * PI * p / (1 << W));
    return (v - $floor(v) - 0.5 < 0.001) && (v - $floor(v) - 0.5 > -0.001);
  endfunction

  initial begin
    int prev;
    @(negedge clk) phase = '0;
    prev = 0;
    for (int p = 1; p <= (1 << W); p++) begin
      @(negedge clk);
      // Sample now shows the entry addressed during the previous cycle.
      checks++;
      if (int'(sample) != ideal(prev) && !(near_tie(prev) &&
          (int'(sample) - ideal(prev) == 1 || int'(sample) - ideal(prev) == -1))) begin
        failures++;
        $display("p=%0d rom %0d ideal %0d", prev, sample, ideal(prev));
      end
      prev  = (p * 37) % (1 << W);
      phase = W'(prev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
