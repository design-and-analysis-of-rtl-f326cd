// gmsk_system: complete GMSK link, modulator -> channel -> demodulator.
//
// Modulator: NRZ (differential) encoder -> 4-register integrator -> 8-tap
// Gaussian FIR -> FM modulation (phase accumulator, optimized CORDIC, two
// DFS, control unit, adder) -> 12-bit gmsk_mod_out.
// Channel: two 5th-order Galois LFSRs add pseudorandom noise.
// Demodulator: FM demodulation (local CORDIC + DFS reference, delay
// register, comparing control unit) -> 4-register differentiator -> NRZ
// decoder -> gmsk_out.
// The bit coders step once per bit on a strobe from bit_timer, every
// SAMPLES_PER_BIT clocks after `start`; the FM stages run every clock with
// `en` high. The demodulator samples its FM decision on the same strobe that
// ends the bit, so gmsk_out reproduces gmsk_in three bit periods later
// (gmsk_in is sampled on a strobe; gmsk_out updates on the strobe three bits
// on).
//
// Interface: clk, rst_n (asynchronous, active low), en (global enable),
// start (arms the bit timer), gmsk_in; outputs gmsk_out, gmsk_mod_out
// (modulated samples), chan_out (noisy samples), and bit_tick / demod_bit
// for observation. amp sets both DFS amplitudes (16 = full scale).
module gmsk_system
  import gmsk_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_BIT = 512,
  parameter int unsigned FCW_LO          = 318,
  parameter int unsigned FCW_HI          = 1127,
  parameter int unsigned STAGES          = 6,
  parameter int unsigned NOISE_SHIFT     = 2,
  parameter int unsigned HYST            = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       start,
  input  logic       gmsk_in,
  input  logic [4:0] amp,
  output logic       gmsk_out,
  output sample_t    gmsk_mod_out,
  output sample_t    chan_out,
  output logic       bit_tick,
  output logic       demod_bit
);
  logic               enc_bit, int_bit, diff_bit, rx_flip;
  logic [GAUSS_W-1:0] gauss;
  logic [7:0]         mod_phase;
  logic signed [7:0]  noise;

  bit_timer #(.SAMPLES_PER_BIT(SAMPLES_PER_BIT)) u_timer (
    .clk (clk), .rst_n (rst_n), .en (en), .start (start), .tick (bit_tick)
  );

  // ---------------- modulator ----------------
  nrz_encoder u_nrz_enc (
    .clk (clk), .rst_n (rst_n), .tick (bit_tick), .data_in (gmsk_in), .enc_out (enc_bit)
  );

  integrator u_integ (
    .clk (clk), .rst_n (rst_n), .tick (bit_tick), .data_in (enc_bit), .int_out (int_bit)
  );

  gaussian_filter u_gauss (
    .clk (clk), .rst_n (rst_n), .en (en), .data_in (int_bit), .gauss_out (gauss)
  );

  fm_modulator #(.FCW_LO(FCW_LO), .FCW_HI(FCW_HI), .STAGES(STAGES)) u_fm_mod (
    .clk (clk), .rst_n (rst_n), .en (en),
    .gauss_in (gauss), .int_bit (int_bit), .amp (amp),
    .gmsk_mod (gmsk_mod_out), .phase_in (mod_phase)
  );

  // ---------------- channel ----------------
  channel #(.NOISE_SHIFT(NOISE_SHIFT)) u_channel (
    .clk (clk), .rst_n (rst_n), .en (en),
    .mod_in (gmsk_mod_out), .chan_out (chan_out), .noise (noise)
  );

  // ---------------- demodulator ----------------
  fm_demodulator #(.FCW_REF(FCW_HI), .STAGES(STAGES), .HYST(HYST)) u_fm_demod (
    .clk (clk), .rst_n (rst_n), .en (en),
    .chan_in (chan_out), .amp (amp), .bit_out (demod_bit), .rx_flip (rx_flip)
  );

  differentiator u_diff (
    .clk (clk), .rst_n (rst_n), .tick (bit_tick), .data_in (demod_bit), .diff_out (diff_bit)
  );

  nrz_decoder u_nrz_dec (
    .clk (clk), .rst_n (rst_n), .tick (bit_tick), .data_in (diff_bit), .dec_out (gmsk_out)
  );
endmodule
