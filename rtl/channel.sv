// channel: pseudorandom noise channel between modulator and demodulator.
//
// Two Galois LFSRs with the same generator polynomial x^5 + x^2 + 1 but
// different seeds run side by side. Their 5-bit states are added, which
// gives a value 2 .. 62 with a roughly triangular spread; 32 is subtracted to
// centre it on zero and the result is scaled by 2^NOISE_SHIFT. This noise is
// added to the 12-bit modulated sample, with saturation, and registered.
// The two LFSRs and the addition of their outputs follow the design; adding
// the full states (rather than single bits), the centring and the scale are
// this implementation's choices to give the noise an amplitude.
//
// Timing: one enabled clock of latency.
module channel
  import gmsk_pkg::*;
#(
  parameter int unsigned   NOISE_SHIFT = 2,
  parameter logic [4:0]    SEED_A      = 5'b00001,
  parameter logic [4:0]    SEED_B      = 5'b10110
) (
  input  logic    clk,
  input  logic    rst_n,  // asynchronous, active low
  input  logic    en,
  input  sample_t mod_in,
  output sample_t chan_out,
  output logic signed [7:0] noise  // noise before scaling (observation)
);
  logic [4:0] sa, sb;
  logic       oa, ob;
  logic signed [SAMPLE_W+1:0] sum;

  galois_lfsr #(.N(5), .POLY(5'b00101), .SEED(SEED_A)) u_lfsr_a (
    .clk (clk), .rst_n (rst_n), .en (en), .state (sa), .out (oa)
  );
  galois_lfsr #(.N(5), .POLY(5'b00101), .SEED(SEED_B)) u_lfsr_b (
    .clk (clk), .rst_n (rst_n), .en (en), .state (sb), .out (ob)
  );

  assign noise = $signed({3'b000, sa}) + $signed({3'b000, sb}) - 8'sd32;
  assign sum   = (SAMPLE_W+2)'(mod_in) + ((SAMPLE_W+2)'(noise) <<< NOISE_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chan_out <= '0;
    else if (en) begin
      if (sum > (SAMPLE_W+2)'(2**(SAMPLE_W-1) - 1))   chan_out <= sample_t'(2**(SAMPLE_W-1) - 1);
      else if (sum < -(SAMPLE_W+2)'(2**(SAMPLE_W-1))) chan_out <= sample_t'(-(2**(SAMPLE_W-1)));
      else                                            chan_out <= sample_t'(sum);
    end
  end
endmodule
