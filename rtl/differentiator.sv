// differentiator: 1-bit differentiator of the GMSK demodulator.
//
// Four temporary registers hold the past demodulated bits; on every bit
// strobe the oldest one is subtracted (modulo 2, i.e. XOR) from the new bit:
// z[k] = x[k] ^ x[k-4]. This is the exact inverse of the integrator, so the
// differentiator returns the encoded bit stream. The four registers and the
// subtractor follow the design; the modulo-2 arithmetic is this
// implementation's reading of a 1-bit output.
//
// Timing: diff_out is registered and changes on the clock edge where tick is
// high.
module differentiator #(
  parameter int unsigned DEPTH = 4  // number of temporary registers
) (
  input  logic clk,
  input  logic rst_n,    // asynchronous, active low
  input  logic tick,     // one-cycle bit strobe
  input  logic data_in,  // FM-demodulated bit
  output logic diff_out  // differentiated bit
);
  logic [DEPTH-1:0] tmp;  // tmp[0] newest, tmp[DEPTH-1] oldest

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmp      <= '0;
      diff_out <= 1'b0;
    end else if (tick) begin
      tmp      <= {tmp[DEPTH-2:0], data_in};
      diff_out <= data_in ^ tmp[DEPTH-1];
    end
  end
endmodule
