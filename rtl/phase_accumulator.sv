// phase_accumulator: numerically controlled phase source for the CORDIC.
//
// An ACC_W-bit accumulator adds the frequency control word every enabled
// clock; its top eight bits are the CORDIC phase input (256 steps per turn).
// The output frequency is f_clk * fcw / 2^ACC_W. This accumulator is how this
// implementation produces the phase_in of the FM modulator and demodulator;
// the source design shows phase_in without saying where it comes from.
module phase_accumulator #(
  parameter int unsigned ACC_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,  // asynchronous, active low
  input  logic             en,
  input  logic [ACC_W-1:0] fcw,    // frequency control word
  output logic [7:0]       phase   // CORDIC phase, 256 units per turn
);
  logic [ACC_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc + fcw;
  end

  assign phase = acc[ACC_W-1 -: 8];
endmodule
