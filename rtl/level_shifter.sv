// level_shifter: removes the DC bias of the reference tone.
//
// The DDS produces offset-binary samples centred on mid-code (the bias
// k1 that the DAC needs). Before the reference tone T2 enters the
// multiplier it must be symmetrical about zero, so OFFSET is subtracted and
// the result is returned as a two's-complement number:
//   out = in - OFFSET.
// With the default OFFSET = 2^(D-1) and the DDS table amplitude of
// 2^(D-1)-1, the result spans -(2^(D-1)-1) .. 2^(D-1)-1 and fits in D
// signed bits; other offsets saturate to the D-bit signed range.
//
// Purely combinational. The block and its purpose follow the document;
// the subtraction of a mid-code offset is this design's choice of how to
// make the tone symmetrical.
module level_shifter #(
  parameter int D      = 8,
  parameter int OFFSET = 2 ** (D - 1)
) (
  input  logic [D-1:0]        in,
  output logic signed [D-1:0] out
);

  localparam logic signed [D+1:0] MAXV = (D+2)'(2 ** (D - 1) - 1);
  localparam logic signed [D+1:0] MINV = -(D+2)'(2 ** (D - 1));

  logic signed [D+1:0] diff;

  always_comb begin
    diff = $signed({2'b00, in}) - (D+2)'(OFFSET);
    if (diff > MAXV)      out = MAXV[D-1:0];
    else if (diff < MINV) out = MINV[D-1:0];
    else                  out = diff[D-1:0];
  end

endmodule
