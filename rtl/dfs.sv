// dfs: digital frequency synthesizer output stage ("DFS for IQ modulation").
//
// It turns the 8-bit CORDIC waveform samples into the 12-bit waveform used
// for IQ modulation: each sample is multiplied by the amplitude word `amp`,
// saturated to 12 bits and registered. With amp = 16 an 8-bit full-scale
// sine fills the 12-bit range. The waveform's frequency is set upstream by
// the phase fed to the CORDIC. The document gives the DFS only by its
// function (it makes the cos2 / sine2 waveforms from the CORDIC outputs); this
// amplitude stage is the simplest form of that and is this implementation's.
//
// Timing: one enabled clock of latency.
module dfs
  import gmsk_pkg::*;
#(
  parameter int unsigned AMP_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,  // asynchronous, active low
  input  logic             en,
  input  cordic_t          wave_in,
  input  logic [AMP_W-1:0] amp,
  output sample_t          wave_out
);
  localparam int PW = CORDIC_W + AMP_W + 1;
  localparam logic signed [PW-1:0] MAXV = PW'(2**(SAMPLE_W-1) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(2**(SAMPLE_W-1));

  logic signed [PW-1:0] prod;
  assign prod = PW'(wave_in) * $signed({1'b0, amp});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           wave_out <= '0;
    else if (en) begin
      if (prod > MAXV)      wave_out <= sample_t'(MAXV);
      else if (prod < MINV) wave_out <= sample_t'(MINV);
      else                  wave_out <= sample_t'(prod);
    end
  end
endmodule
