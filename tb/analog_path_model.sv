// analog_path_model: behavioural model, not synthesizable. Stands in for
// the DAC, the analog device under test and the ADC of the measurement
// loop as one discrete-time system clocked at the sample rate:
//   - the DAC code is delayed by LATENCY clocks (converter latency and any
//     pure delay of the device),
//   - a first-order low-pass y[n] = y[n-1] + ALPHA*(x[n] - y[n-1]) acts on
//     the code (unity DC gain, corner near ALPHA*f_clk/(2*pi)),
//   - the ADC rounds y to a D-bit code.
// With ALPHA = 1 the path is a pure delay. The state starts at mid-code.
module analog_path_model #(
  parameter int  D       = 8,
  parameter int  LATENCY = 4,
  parameter real ALPHA   = 0.01
) (
  input  logic         clk,
  input  logic [D-1:0] dac_data,
  output logic [D-1:0] adc_data
);
  logic [D-1:0] pipe [LATENCY];
  real y = 2.0 ** (D - 1);

  initial begin
    foreach (pipe[i]) pipe[i] = D'(2 ** (D - 1));
    adc_data = D'(2 ** (D - 1));
  end

  always @(posedge clk) begin
    real x;
    x = real'(pipe[LATENCY-1]);
    for (int i = LATENCY - 1; i > 0; i--) pipe[i] <= pipe[i-1];
    pipe[0] <= dac_data;
    y = y + ALPHA * (x - y);
    if (y < 0.0) adc_data <= '0;
    else if (y > 2.0 ** D - 1.0) adc_data <= '1;
    else adc_data <= D'(int'($floor(y + 0.5)));
  end
endmodule
