// mac_ora: multiplier-accumulator output response analyser (ORA2).
//
// Multiplies every device output sample d (the ADC code, with its DC bias)
// by the symmetrical reference tone t2 and sums the products over exactly
// 2^L clock cycles. The window is a whole number of periods of every test
// tone whose FCW is even, so the double-frequency term and the bias term of
//   t2 * d = A1*A2/2 * (cos(theta) + cos(2wt + theta)) + k2 * t2
// cancel and the sum is A1*A2/2 * cos(theta) * 2^L. When t2 is phase-aligned
// with the response (theta = 0) the result is proportional to the
// response amplitude A2.
//
// Interface: start (one-cycle pulse) clears the accumulator and opens the
// window; the sample pair present in the cycle of start is the first one
// summed. done pulses one clock after the last of the 2^L pairs, when
// result holds the final sum; result stays until the next start. busy is
// high during the window.
//
// Timing: done is raised 2^L clocks after the start cycle, i.e. in the
// cycle right after the last pair. Products are not pipelined.
//
// The multiplier, the accumulator and the 2^L-cycle window follow the
// document; widths (2D+1+L bit signed sum, enough for 2^L full-scale
// products) and the handshake are this design's choices.
module mac_ora #(
  parameter int L     = 16,              // window is 2^L cycles
  parameter int D     = 8,               // sample width
  parameter int ACC_W = 2 * D + 1 + L    // accumulator width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [D-1:0]     t2,
  input  logic [D-1:0]            d,
  output logic                    busy,
  output logic                    done,
  output logic signed [ACC_W-1:0] result
);

  logic [L:0]               remaining;
  logic signed [2*D:0]      product;
  logic signed [ACC_W-1:0]  acc;

  assign product = t2 * $signed({1'b0, d});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
      acc       <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      result    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        acc       <= ACC_W'(product);
        remaining <= (L+1)'(2 ** L - 1);
        busy      <= 1'b1;
      end else if (busy) begin
        if (remaining == 1) begin
          result <= acc + ACC_W'(product);
          busy   <= 1'b0;
          done   <= 1'b1;
        end
        acc       <= acc + ACC_W'(product);
        remaining <= remaining - 1'b1;
      end
    end
  end

endmodule
