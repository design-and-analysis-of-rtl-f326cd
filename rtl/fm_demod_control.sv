// fm_demod_control: control unit of the FM demodulator.
//
// It compares the received waveform with the locally synthesized reference
// and decides, every clock, whether the received tone is the "1" tone.
// Both inputs pass through a zero-crossing detector with hysteresis: the
// polarity flips only when the sample goes beyond +HYST or below -HYST, so
// channel noise smaller than HYST makes no false crossing. A counter per input
// measures the clocks between polarity flips (half a period). The reference
// runs at the "1" frequency; its half period R is stored. The received tone
// is decided to be a 1 while both its last full half period and the half
// period in progress are shorter than 2R, and a 0 otherwise; a 0 tone (half
// period 3.5 R at the default frequencies) is thus recognised as soon as the
// count in progress passes 2R. The document says only that the control unit
// compares the delayed DFS output with the channel output; the half-period
// comparison is this implementation's.
//
// Timing: bit_out is registered, one enabled clock after a deciding sample.
module fm_demod_control
  import gmsk_pkg::*;
#(
  parameter int unsigned HYST  = 256,
  parameter int unsigned CNT_W = 10
) (
  input  logic    clk,
  input  logic    rst_n,  // asynchronous, active low
  input  logic    en,
  input  sample_t rx_in,   // channel output
  input  sample_t ref_in,  // delayed DFS output
  output logic    bit_out, // FM-demodulated bit
  output logic    rx_flip  // received polarity flipped this clock (observation)
);
  localparam sample_t HP = sample_t'(HYST);
  localparam sample_t HN = -sample_t'(HYST);

  logic             rx_pol, ref_pol, ref_flip, ref_seen;
  logic [CNT_W-1:0] rx_cnt, rx_last, ref_cnt, ref_half;
  logic [CNT_W:0]   thr;

  assign rx_flip  = rx_pol  ? (rx_in  < HN) : (rx_in  > HP);
  assign ref_flip = ref_pol ? (ref_in < HN) : (ref_in > HP);
  assign thr      = {ref_half, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_pol   <= 1'b0;
      ref_pol  <= 1'b0;
      rx_cnt   <= '0;
      rx_last  <= '1;
      ref_cnt  <= '0;
      ref_half <= '0;
      ref_seen <= 1'b0;
      bit_out  <= 1'b0;
    end else if (en) begin
      // received waveform
      if (rx_flip) begin
        rx_pol  <= ~rx_pol;
        rx_last <= rx_cnt;
        rx_cnt  <= '0;
      end else if (rx_cnt != '1) begin
        rx_cnt  <= rx_cnt + 1'b1;
      end
      // reference waveform; the first flip only starts the count
      if (ref_flip) begin
        ref_pol  <= ~ref_pol;
        ref_seen <= 1'b1;
        if (ref_seen) ref_half <= ref_cnt;
        ref_cnt  <= '0;
      end else if (ref_cnt != '1) begin
        ref_cnt  <= ref_cnt + 1'b1;
      end
      // decision
      bit_out <= (ref_half != '0) &&
                 ((CNT_W+1)'(rx_last) < thr) && ((CNT_W+1)'(rx_cnt) < thr);
    end
  end
endmodule
