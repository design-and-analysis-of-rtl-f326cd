// fm_mod_control: control unit and adder of the FM modulator.
//
// The control unit steers the two DFS waveforms with the integrator bit: for
// a 1 the cos2 waveform becomes I (and Q is 0), for a 0 the sine2 waveform
// becomes Q (and I is 0). The adder then forms the 12-bit modulated sample
// Gmsk_mod = I + Q, which is registered. This follows the design.
//
// Timing: one enabled clock of latency.
module fm_mod_control
  import gmsk_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,  // asynchronous, active low
  input  logic    en,
  input  logic    sel,    // integrator bit, aligned with cos2 / sine2
  input  sample_t cos2,
  input  sample_t sine2,
  output sample_t gmsk_mod
);
  sample_t i_s, q_s;

  always_comb begin
    i_s = sel ? cos2  : '0;
    q_s = sel ? '0    : sine2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  gmsk_mod <= '0;
    else if (en) gmsk_mod <= i_s + q_s;
  end
endmodule
