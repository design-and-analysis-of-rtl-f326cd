// gaussian_filter: 8-tap FIR Gaussian pulse-shaping filter of the modulator.
//
// The 1-bit integrator output enters a tapped delay line; each of the eight
// taps is multiplied by its coefficient and seven adders sum the products
// into a 16-bit output, which drives the frequency of the FM modulator. The
// tap count, the 16-bit output and the multiply/add structure follow the
// design. The coefficients are this implementation's: a sampled Gaussian,
// h[k] ~ exp(-(k-3.5)^2 / (2 * 1.5^2)), scaled so that the eight add up to
// exactly 2^15; a run of ones therefore gives 32768 and a run of zeros 0.
// The filter runs at the sample rate (every clock with `en` high).
//
// Timing: the output register is loaded every enabled clock; a new input bit
// affects the output one clock later.
module gaussian_filter #(
  parameter int unsigned TAPS = 8,
  parameter int unsigned OUT_W = 16,
  parameter logic [OUT_W-1:0] COEF [TAPS] =
    '{16'd576, 16'd2187, 16'd5321, 16'd8300, 16'd8300, 16'd5321, 16'd2187, 16'd576}
) (
  input  logic             clk,
  input  logic             rst_n,    // asynchronous, active low
  input  logic             en,       // sample enable
  input  logic             data_in,  // integrator bit
  output logic [OUT_W-1:0] gauss_out // filtered value, 0 .. sum(COEF)
);
  logic [TAPS-1:1]  dly;  // dly[k] holds the input of k samples ago
  logic [TAPS-1:0]  tap;
  logic [OUT_W-1:0] sum;

  always_comb begin
    tap = {dly, data_in};
    sum = '0;
    for (int k = 0; k < TAPS; k++) sum = sum + COEF[k] * OUT_W'(tap[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly       <= '0;
      gauss_out <= '0;
    end else if (en) begin
      dly       <= tap[TAPS-2:0];
      gauss_out <= sum;
    end
  end
endmodule
