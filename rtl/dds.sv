// dds: direct digital synthesizer with the delta-sigma modulator placed in
// front of the phase accumulator.
//
// The L-bit frequency control word is split ("FCW truncation") into its W
// high bits, which go straight to the phase accumulator, and its L-W low
// bits, which feed a K-th order delta-sigma modulator. Since the low bits
// are constant for a given tone, the modulator always sees a DC input and
// its oversampling ratio does not depend on the FCW. The modulator output
// is added to the high bits, the W-bit accumulator integrates the sum, and
// a 2^W-entry sine ROM turns the phase into a D-bit sample. The output
// frequency is FCW * f_clk / 2^L, i.e. the resolution of an L-bit
// accumulator although only W bits are accumulated.
//
// Interface: fcw is sampled every clock; sample is offset-binary (mid-code
// = zero); msb is the sample's MSB (the tone's sign). clear synchronously
// restarts the synthesizer from phase start_phase (0 for a plain reset)
// with an empty modulator; while clear is held the output sits at the
// sample of start_phase.
//
// Timing: a change of fcw reaches the phase two clocks later (modulator
// register, accumulator register) and the sample one clock after that.
// If clear is last high in cycle c, the phase is start_phase in cycles
// c+1 and c+2 and advances from cycle c+3; the sample of start_phase is
// therefore the output of cycle c+3 and the next phase step appears in
// cycle c+4 (restart latency of 3 clocks).
//
// Structure and the constant-input modulator follow the document; the
// pipelining, clear and start-phase behaviour are this design's choices.
module dds #(
  parameter int L = 16,  // FCW width (frequency resolution f_clk / 2^L)
  parameter int W = 10,  // phase accumulator / ROM address width
  parameter int D = 8,   // sample width (DAC resolution)
  parameter int K = 3    // delta-sigma order
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [W-1:0] start_phase,
  input  logic [L-1:0] fcw,
  output logic [D-1:0] sample,
  output logic         msb,
  output logic [W-1:0] phase
);

  localparam int B = L - W;

  logic [W-1:0]        fcw_msb;
  logic [B-1:0]        fcw_lsb;
  logic signed [K:0]   dither;
  logic [W-1:0]        fcw_msb_q;

  // FCW truncation.
  assign fcw_msb = fcw[L-1:B];
  assign fcw_lsb = fcw[B-1:0];

  sd_mash #(.B(B), .K(K), .OUT_W(K + 1)) u_sd (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (clear),
    .x     (fcw_lsb),
    .y     (dither)
  );

  // Align the high bits with the registered modulator output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     fcw_msb_q <= '0;
    else if (clear) fcw_msb_q <= '0;
    else            fcw_msb_q <= fcw_msb;
  end

  phase_accumulator #(.W(W), .DW(K + 1)) u_acc (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (clear),
    .load    (start_phase),
    .inc_msb (fcw_msb_q),
    .dither  (dither),
    .phase   (phase)
  );

  sine_rom #(.W(W), .D(D)) u_rom (
    .clk    (clk),
    .phase  (phase),
    .sample (sample)
  );

  assign msb = sample[D-1];

  initial assert (L > W && W >= 3)
    else $error("dds: need L > W >= 3");

endmodule
