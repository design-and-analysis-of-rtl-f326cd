// bit_timer: bit-period strobe generator. After `start` has been seen high
// (while en is high) it counts enabled clocks and raises `tick` for one clock
// every SAMPLES_PER_BIT clocks. The NRZ coders, the integrator and the
// differentiator step on this strobe, so one data bit lasts SAMPLES_PER_BIT
// samples of the modulated waveform. The bit period is this implementation's
// choice; the source design only holds each input bit for many carrier
// cycles. An assertion states the strobe rule: tick is never high on two
// clocks in a row.
module bit_timer #(
  parameter int unsigned SAMPLES_PER_BIT = 512
) (
  input  logic clk,
  input  logic rst_n,  // asynchronous, active low
  input  logic en,
  input  logic start,
  output logic tick
);
  localparam int unsigned CW = $clog2(SAMPLES_PER_BIT);
  logic [CW-1:0] cnt;
  logic          running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cnt     <= '0;
    end else if (en) begin
      if (start) running <= 1'b1;
      if (running || start) begin
        if (cnt == CW'(SAMPLES_PER_BIT - 1)) cnt <= '0;
        else                                cnt <= cnt + 1'b1;
      end
    end
  end

  assign tick = en && running && (cnt == CW'(SAMPLES_PER_BIT - 1));

  a_tick_single : assert property (@(posedge clk) disable iff (!rst_n) tick |=> !tick)
    else $error("bit strobe high on two consecutive clocks");
endmodule
