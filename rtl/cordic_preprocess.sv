// cordic_preprocess: preprocessing unit of the optimized CORDIC.
//
// The two MSBs of the 8-bit phase (phase[7:6]) name the quadrant; they go to
// the delay unit. The remaining six bits are the angle inside the quadrant,
// 0 .. 63 steps of 90/64 degree; they are rescaled to the CORDIC's Z units
// (128 units = 90 degrees) by one left shift, giving the 8-bit Z_0 of the
// pipeline. Purely combinational.
module cordic_preprocess
  import gmsk_pkg::*;
(
  input  logic [7:0] phase_in,
  output quadrant_t  quadrant,
  output cordic_t    z0
);
  assign quadrant = phase_in[7:6];
  assign z0       = {1'b0, phase_in[5:0], 1'b0};
endmodule
