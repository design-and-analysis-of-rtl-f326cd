// nrz_encoder: differential (NRZ) encoder at the head of the GMSK modulator.
//
// An XOR gate combines the incoming data bit with the output of a D flip-flop
// and feeds the result back into that flip-flop, as the design describes; the
// flip-flop output is the encoder output: e[k] = d[k] ^ e[k-1].
// The flip-flop only loads on the bit strobe `tick`, one strobe per data bit
// (the strobe and the active-low reset are choices of this implementation).
//
// Timing: enc_out changes on the clock edge where tick is high and holds for
// the rest of the bit period.
module nrz_encoder (
  input  logic clk,
  input  logic rst_n,   // asynchronous, active low
  input  logic tick,    // one-cycle bit strobe
  input  logic data_in, // 1-bit GMSK input
  output logic enc_out  // differentially encoded bit
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    enc_out <= 1'b0;
    else if (tick) enc_out <= data_in ^ enc_out;
  end
endmodule
