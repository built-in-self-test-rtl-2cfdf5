// tb_sd_mash: self-checking test of the 3rd-order MASH modulator.
//
// A cycle-accurate reference of the MASH 1-1-1 recursion (three modulo-2^B
// integrators and the noise-cancellation network) runs alongside the
// module for several constant inputs, including 0 and the largest code.
// Each output is compared with the reference and with the range -3..+4,
// and after every 4*2^B cycles the running sum of outputs must equal
// x*n/2^B within the bound of the cancellation terms (mean = x/2^B).
// clear is exercised between inputs.
module tb_sd_mash;
  localparam int B = 6;
  localparam int M = 1 << B;

  logic clk = 0, rst_n = 0, clear = 0;
  logic [B-1:0] x = '0;
  logic signed [3:0] y;
  int checks = 0, failures = 0;

  sd_mash #(.B(B), .K(3), .OUT_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference state.
  int a1, a2, a3, t2d, t3d, yref;

  task automatic ref_step(input int xin);
    int s1, s2, s3, c1, c2, c3, t2, t3;
    s1 = a1 + xin; c1 = s1 / M; s1 = s1 % M;
    s2 = a2 + s1;  c2 = s2 / M; s2 = s2 % M;
    s3 = a3 + s2;  c3 = s3 / M; s3 = s3 % M;
    t3 = c3;
    t2 = c2 + t3 - t3d;
    yref = c1 + t2 - t2d;
    a1 = s1; a2 = s2; a3 = s3; t2d = t2; t3d = t3;
  endtask

  int xs[6] = '{0, 1, 5, 32, 47, 63};
  int sum;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (xs[i]) begin
      @(negedge clk); clear = 1; x = B'(xs[i]);
      @(negedge clk); clear = 0;
      a1 = 0; a2 = 0; a3 = 0; t2d = 0; t3d = 0; sum = 0;
      for (int n = 1; n <= 8 * M; n++) begin
        @(posedge clk); #1;
        ref_step(xs[i]);
        checks++;
        if (int'(y) != yref || y < -3 || y > 4) begin
          failures++;
          $display("x=%0d n=%0d y=%0d expected %0d", xs[i], n, y, yref);
        end
        sum += int'(y);
        if (n % (4 * M) == 0) begin
          checks++;
          if (sum - xs[i] * n / M > 3 || sum - xs[i] * n / M < -3) begin
            failures++;
            $display("x=%0d mean wrong: sum %0d over %0d", xs[i], sum, n);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
