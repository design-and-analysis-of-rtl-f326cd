// fm_demodulator: FM demodulation stage of the GMSK demodulator.
//
// A local phase accumulator running at the "1" frequency (FCW_REF) feeds the
// optimized CORDIC; its cosine output cos1 goes through DFS-1 to give cos2,
// which a delay register holds before the control unit. The control unit
// compares that reference with the channel output and produces the 1-bit
// FM-demodulated output (see fm_demod_control). The CORDIC / DFS-1 / delay
// register / control unit chain follows the design; the local phase source,
// its frequency and the comparison rule are this implementation's.
//
// Timing: continuous; bit_out follows a change of received tone within
// about two half periods of the slower tone.
module fm_demodulator
  import gmsk_pkg::*;
#(
  parameter int unsigned ACC_W     = 16,
  parameter int unsigned FCW_REF   = 1127,
  parameter int unsigned STAGES    = 6,
  parameter int unsigned REF_DELAY = 1,
  parameter int unsigned HYST      = 256
) (
  input  logic       clk,
  input  logic       rst_n,   // asynchronous, active low
  input  logic       en,
  input  sample_t    chan_in, // channel output
  input  logic [4:0] amp,     // DFS amplitude, 16 = full scale
  output logic       bit_out, // FM-demodulated bit
  output logic       rx_flip  // received polarity flip (observation)
);
  logic [7:0] phase_in;
  cordic_t    cos1, sine1_unused;
  sample_t    cos2, cos2_dly;

  phase_accumulator #(.ACC_W(ACC_W)) u_nco (
    .clk (clk), .rst_n (rst_n), .en (en), .fcw (ACC_W'(FCW_REF)), .phase (phase_in)
  );

  optimized_cordic #(.STAGES(STAGES)) u_cordic (
    .clk (clk), .rst_n (rst_n), .en (en),
    .phase_in (phase_in), .cos_out (cos1), .sin_out (sine1_unused)
  );

  dfs u_dfs1 (.clk (clk), .rst_n (rst_n), .en (en), .wave_in (cos1), .amp (amp), .wave_out (cos2));

  delay_line #(.W(SAMPLE_W), .DEPTH(REF_DELAY)) u_dly (
    .clk (clk), .rst_n (rst_n), .en (en), .d (cos2), .q (cos2_dly)
  );

  fm_demod_control #(.HYST(HYST)) u_ctrl (
    .clk (clk), .rst_n (rst_n), .en (en),
    .rx_in (chan_in), .ref_in (cos2_dly), .bit_out (bit_out), .rx_flip (rx_flip)
  );
endmodule
