// phase_accumulator: W-bit DDS phase accumulator with a delta-sigma
// dithered increment.
//
// Each clock the phase advances by the W high bits of the frequency control
// word plus the signed delta-sigma output, modulo 2^W. Because the
// delta-sigma sequence averages to the FCW low bits / 2^(L-W), the mean
// phase step is FCW / 2^(L-W) and the tone frequency keeps the full
// resolution f_clk / 2^L while the accumulator is only W bits wide.
//
// Interface: inc_msb is FCW[L-1:L-W], dither the modulator output. phase
// is the registered accumulator value that addresses the sine table.
// clear synchronously sets the phase to load (zero for a plain restart).
// Active-low asynchronous reset.
//
// The two adders and the W-bit register follow the document's modified
// DDS structure; the order of the adders and the clear/load input are this
// design's choices.
module phase_accumulator #(
  parameter int W    = 10,  // accumulator (table address) width
  parameter int DW   = 4    // signed dither width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [W-1:0]         load,
  input  logic [W-1:0]         inc_msb,
  input  logic signed [DW-1:0] dither,
  output logic [W-1:0]         phase
);

  logic [W-1:0] step;

  // Sign-extend the dither to W bits; the sum wraps modulo 2^W.
  assign step = inc_msb + W'(dither);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     phase <= '0;
    else if (clear) phase <= load;
    else            phase <= phase + step;
  end

endmodule
