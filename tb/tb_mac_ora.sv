// tb_mac_ora: feeds random signed reference samples and unsigned ADC codes
// to the multiplier-accumulator and compares the result with a sum of
// products kept by the testbench over the same 2^L pairs. done must come
// exactly 2^L clocks after start and busy must cover the window. A
// second window with full-scale opposite-sign inputs checks the range of
// the accumulator, and a third with a sine pair checks equation (5):
// 2^L * A^2/2 for in-phase tones.
module tb_mac_ora;
  localparam int L = 16, D = 8, ACC_W = 2 * D + 1 + L;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [D-1:0] t2 = '0;
  logic [D-1:0] d = '0;
  logic busy, done;
  logic signed [ACC_W-1:0] result;
  int checks = 0, failures = 0;

  mac_ora #(.L(L), .D(D), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mode 0: random, 1: full scale, 2: sine pair (period 256 cycles).
  task automatic run_window(input int mode, output longint expected);
    int n, lat;
    expected = 0;
    n = 0;
    lat = 0;
    @(negedge clk);
    start = 1;
    while (n < (1 << L) || !done) begin
      if (n < (1 << L)) begin
        case (mode)
          0: begin t2 = D'($urandom); d = D'($urandom); end
          1: begin t2 = -(D'(127)); d = '1; end
          default: begin
            t2 = D'(int'($floor(127.0 * $sin(2.0 * PI * n / 256.0) + 0.5)));
            d  = D'(128 + int'($floor(127.0 * $sin(2.0 * PI * n / 256.0) + 0.5)));
          end
        endcase
        expected += longint'(t2) * longint'(d);
      end
      @(posedge clk); #1;
      n++;
      lat++;
      if (n == 1) begin
        checks++;
        if (!busy) begin failures++; $display("busy not set"); end
      end
      @(negedge clk);
      start = 0;
      if (lat > (1 << L) + 5) break;
    end
    checks++;
    if (lat != (1 << L)) begin
      failures++;
      $display("mode %0d: done after %0d clocks", mode, lat);
    end
  endtask

  initial begin
    longint expected;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 3; mode++) begin
      run_window(mode, expected);
      checks++;
      if (longint'(result) != expected) begin
        failures++;
        $display("mode %0d: result %0d expected %0d", mode, result, expected);
      end
    end
    // Equation (5): A1*A2/2 * 2^L with A1 = A2 = 127, within 1 %.
    checks++;
    if (real'(result) < 0.99 * 127.0 * 127.0 / 2.0 * (1 << L) ||
        real'(result) > 1.01 * 127.0 * 127.0 / 2.0 * (1 << L)) begin
      failures++;
      $display("sine pair result %0d", result);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
