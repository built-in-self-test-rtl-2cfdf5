// sd_mash: K-th order MASH 1-1-...-1 delta-sigma modulator for a DC input.
//
// The DDS splits its L-bit frequency control word into W high bits and
// B = L-W low bits. The low bits are a constant during a test tone; this
// modulator turns them into a small integer sequence y whose long-run mean
// is x / 2^B, with the quantisation error shaped to high frequencies
// (K-th order high-pass). y is added to the W-bit phase increment.
//
// Structure: K cascaded B-bit accumulators. Stage 1 integrates x, stage k
// integrates the residue (sum modulo 2^B) of stage k-1. The carries c_k are
// recombined by the usual noise-cancellation network
//   y = c1 + (1 - z^-1) (c2 + (1 - z^-1) (c3 + ...)),
// built as a chain t_K = c_K, t_k = c_k + t_{k+1} - t_{k+1}[n-1].
// For K = 3 the output lies in -3..+4.
//
// Timing: y is registered, one cycle after the carries. clear
// synchronously empties all accumulators and delay registers (used when a
// DDS is restarted from phase zero). Active-low asynchronous reset.
//
// The document asks for a K-th order modulator fed by the constant FCW low
// bits and reports 3rd-order MASH among four equivalent structures it
// tried; MASH 1-1-1 is the one built here. Word widths, registering and the
// clear input are this design's choices.
module sd_mash #(
  parameter int B     = 6,          // input (FCW low part) width, L-W
  parameter int K     = 3,          // modulator order
  parameter int OUT_W = K + 1       // signed output width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic [B-1:0]            x,
  output logic signed [OUT_W-1:0] y
);

  logic [B-1:0]            acc_q   [K];
  logic [B-1:0]            acc_d   [K];
  logic                    carry   [K];
  logic signed [OUT_W-1:0] t       [K];
  logic signed [OUT_W-1:0] t_dly_q [K];

  // Accumulator cascade: stage 0 integrates x, stage k the residue of
  // stage k-1.
  for (genvar k = 0; k < K; k++) begin : g_stage
    logic [B:0] sum;
    if (k == 0) begin : g_first
      assign sum = {1'b0, acc_q[0]} + {1'b0, x};
    end else begin : g_next
      assign sum = {1'b0, acc_q[k]} + {1'b0, acc_d[k-1]};
    end
    assign acc_d[k] = sum[B-1:0];
    assign carry[k] = sum[B];
  end

  // Noise-cancellation network, innermost stage first.
  always_comb begin
    for (int k = K - 1; k >= 0; k--) begin
      if (k == K - 1) t[k] = OUT_W'(carry[k]);
      else            t[k] = OUT_W'(carry[k]) + t[k+1] - t_dly_q[k+1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) begin
        acc_q[k]   <= '0;
        t_dly_q[k] <= '0;
      end
      y <= '0;
    end else if (clear) begin
      for (int k = 0; k < K; k++) begin
        acc_q[k]   <= '0;
        t_dly_q[k] <= '0;
      end
      y <= '0;
    end else begin
      for (int k = 0; k < K; k++) begin
        acc_q[k]   <= acc_d[k];
        t_dly_q[k] <= t[k];
      end
      y <= t[0];
    end
  end

endmodule
