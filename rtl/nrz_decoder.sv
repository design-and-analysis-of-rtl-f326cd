// nrz_decoder: differential (NRZ) decoder at the end of the GMSK demodulator.
//
// It undoes nrz_encoder: on every bit strobe it XORs the new bit with the
// bit of the previous strobe, d[k] = e[k] ^ e[k-1], and registers the result
// as the 1-bit GMSK output. The document names the decoder; the XOR form is
// the inverse of its encoder and is this implementation's choice.
//
// Timing: dec_out changes one clock edge after the strobe that samples
// data_in and holds for the bit period.
module nrz_decoder (
  input  logic clk,
  input  logic rst_n,   // asynchronous, active low
  input  logic tick,    // one-cycle bit strobe
  input  logic data_in, // bit from the differentiator
  output logic dec_out  // decoded GMSK output bit
);
  logic prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev    <= 1'b0;
      dec_out <= 1'b0;
    end else if (tick) begin
      prev    <= data_in;
      dec_out <= data_in ^ prev;
    end
  end
endmodule
