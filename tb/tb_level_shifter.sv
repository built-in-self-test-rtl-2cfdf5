// tb_level_shifter: exhaustive check that every offset-binary code comes
// out as code - 128 in two's complement (default D = 8).
module tb_level_shifter;
  logic [7:0] in;
  logic signed [7:0] out;
  int checks = 0, failures = 0;

  level_shifter #(.D(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      in = 8'(c);
      #1;
      checks++;
      if (int'(out) != c - 128) begin
        failures++;
        $display("in %0d out %0d", c, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
