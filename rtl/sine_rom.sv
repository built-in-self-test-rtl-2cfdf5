// sine_rom: DDS look-up table converting a W-bit phase to a D-bit
// offset-binary sine sample.
//
// The table holds one full period, 2^W entries of
//   2^(D-1) + round((2^(D-1)-1) * sin(2*pi*p/2^W)),
// computed at initialisation by bist_pkg::sine_code, so it is a plain ROM
// that FPGA and ASIC flows can map to block or distributed memory. The
// sample's MSB is therefore 1 for the positive half-period, which is what
// the phase detector uses as the tone's square-wave version.
//
// Timing: one cycle read latency (registered output). There is no reset
// on the output register; it is defined one clock after any phase input.
//
// The document specifies a sine look-up table ROM fed by the phase
// accumulator and sized by the DAC word length D; the full-wave layout, the
// amplitude of 2^(D-1)-1 around mid-code and the registered read are this
// design's choices.
module sine_rom #(
  parameter int W = 10,  // phase (address) width
  parameter int D = 8    // sample width (DAC resolution)
) (
  input  logic         clk,
  input  logic [W-1:0] phase,
  output logic [D-1:0] sample
);

  logic [D-1:0] rom [2**W];

  initial begin
    for (int i = 0; i < 2**W; i++)
      rom[i] = D'(bist_pkg::sine_code(i, W, D));
  end

  always_ff @(posedge clk) sample <= rom[phase];

endmodule
