// integrator: 1-bit integrator between the NRZ encoder and the Gaussian filter.
//
// Four temporary registers hold the integrator's past outputs in a shift
// chain; on every bit strobe the oldest of them is added (modulo 2, i.e.
// XOR, since the output is a single bit) to the new input and the sum is
// shifted in: y[k] = x[k] ^ y[k-4]. The output is the newest register.
// The four registers and the "last register plus input" rule follow the
// design; the modulo-2 sum and the bit strobe are this implementation's
// reading of a 1-bit output.
//
// Timing: int_out changes on the clock edge where tick is high.
module integrator #(
  parameter int unsigned DEPTH = 4  // number of temporary registers
) (
  input  logic clk,
  input  logic rst_n,   // asynchronous, active low
  input  logic tick,    // one-cycle bit strobe
  input  logic data_in, // encoded bit
  output logic int_out  // integrated bit
);
  logic [DEPTH-1:0] tmp;  // tmp[0] newest, tmp[DEPTH-1] oldest

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    tmp <= '0;
    else if (tick) tmp <= {tmp[DEPTH-2:0], data_in ^ tmp[DEPTH-1]};
  end

  assign int_out = tmp[0];
endmodule
