// tb_phase_accumulator: random increments and signed dither values are
// applied; the registered phase is compared every cycle with a modulo-2^W
// running sum kept by the testbench. clear must load the phase with load.
module tb_phase_accumulator;
  localparam int W = 10;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [W-1:0] inc_msb = '0, phase, load = '0;
  logic signed [3:0] dither = '0;
  int checks = 0, failures = 0;
  int expected = 0;

  phase_accumulator #(.W(W), .DW(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      clear   = (n % 1000 == 999);
      load    = W'($urandom);
      inc_msb = W'($urandom);
      dither  = 4'(int'($urandom_range(0, 7)) - 3);
      @(posedge clk); #1;
      if (clear) expected = int'(load);
      else expected = (expected + int'(inc_msb) + int'(dither)) & ((1 << W) - 1);
      checks++;
      if (int'(phase) != expected) begin
        failures++;
        if (failures < 10) $display("n=%0d phase %0d expected %0d", n, phase, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
