// fm_modulator: FM modulation stage of the GMSK modulator.
//
// The Gaussian filter output sets the frequency: a phase accumulator adds
//   fcw = FCW_LO + ((FCW_HI - FCW_LO) * gauss_in) >> GAUSS_SHIFT
// every clock, so a settled 1 (gauss_in = 2^GAUSS_SHIFT) runs at
// f_clk * FCW_HI / 2^16 and a settled 0 at f_clk * FCW_LO / 2^16, with a
// Gaussian-smoothed, phase-continuous change between them. The top eight
// accumulator bits are phase_in of the optimized CORDIC, which produces cos1
// and sine1; DFS-1 and DFS-2 turn them into the 12-bit cos2 and sine2; the
// control unit passes cos2 as I for an integrator bit of 1 and sine2 as Q for
// a 0; the adder outputs Gmsk_mod = I + Q.
// The CORDIC / two-DFS / control unit / adder structure follows the design.
// The defaults FCW_HI = 1127 and FCW_LO = 318 give the 1.72 MHz and
// 485.43 kHz tones the design reports for input bits 1 and 0, assuming the
// 100 MHz system clock it uses for its power figures. The phase accumulator
// and the alignment delay of the integrator bit (the CORDIC and DFS latency,
// STAGES + 2 clocks) are this implementation's.
//
// Timing: continuous, one 12-bit sample per enabled clock.
module fm_modulator
  import gmsk_pkg::*;
#(
  parameter int unsigned ACC_W       = 16,
  parameter int unsigned FCW_LO      = 318,
  parameter int unsigned FCW_HI      = 1127,
  parameter int unsigned GAUSS_SHIFT = 15,
  parameter int unsigned STAGES      = 6
) (
  input  logic               clk,
  input  logic               rst_n,      // asynchronous, active low
  input  logic               en,
  input  logic [GAUSS_W-1:0] gauss_in,   // Gaussian filter output
  input  logic               int_bit,    // integrator output
  input  logic [4:0]         amp,        // DFS amplitude, 16 = full scale
  output sample_t            gmsk_mod,   // modulated sample
  output logic [7:0]         phase_in    // CORDIC phase (observation)
);
  localparam int unsigned DELTA = FCW_HI - FCW_LO;

  logic [ACC_W-1:0] fcw;
  logic [31:0]      scaled;
  cordic_t          cos1, sine1;
  sample_t          cos2, sine2;
  logic             sel;

  assign scaled = (32'(DELTA) * 32'(gauss_in)) >> GAUSS_SHIFT;
  assign fcw    = ACC_W'(FCW_LO) + ACC_W'(scaled);

  phase_accumulator #(.ACC_W(ACC_W)) u_nco (
    .clk (clk), .rst_n (rst_n), .en (en), .fcw (fcw), .phase (phase_in)
  );

  optimized_cordic #(.STAGES(STAGES)) u_cordic (
    .clk (clk), .rst_n (rst_n), .en (en),
    .phase_in (phase_in), .cos_out (cos1), .sin_out (sine1)
  );

  dfs u_dfs1 (.clk (clk), .rst_n (rst_n), .en (en), .wave_in (cos1),  .amp (amp), .wave_out (cos2));
  dfs u_dfs2 (.clk (clk), .rst_n (rst_n), .en (en), .wave_in (sine1), .amp (amp), .wave_out (sine2));

  delay_line #(.W(1), .DEPTH(STAGES + 2)) u_sel_dly (
    .clk (clk), .rst_n (rst_n), .en (en), .d (int_bit), .q (sel)
  );

  fm_mod_control u_ctrl (
    .clk (clk), .rst_n (rst_n), .en (en),
    .sel (sel), .cos2 (cos2), .sine2 (sine2), .gmsk_mod (gmsk_mod)
  );
endmodule
