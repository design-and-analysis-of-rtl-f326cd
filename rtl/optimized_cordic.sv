// optimized_cordic: quadrant-mapped, pipelined CORDIC sine/cosine generator.
//
// An 8-bit phase (256 units per turn) enters the preprocessing unit, which
// splits off the quadrant bits [7:6] and hands the in-quadrant angle to the
// six-stage pipelined CORDIC. A delay unit carries the quadrant bits along
// the pipeline so that the postprocessing unit can fold the first-quadrant
// result back into the right quadrant. X_0 is the constant X_INIT (the CORDIC
// gain 0.6073 folded in) and Y_0 is 0, so the outputs swing about +-125:
//   cos_out ~ 125 * cos(2 pi phase / 256),  sin_out ~ 125 * sin(...)
// The block structure, the 8-bit widths and the six stages follow the
// design; X_INIT and the angle scaling are this implementation's.
//
// Timing: one phase per enabled clock; latency STAGES + 1 enabled clocks
// (seven for the default six stages): the pipeline stages plus the output
// register of the postprocessing unit.
module optimized_cordic
  import gmsk_pkg::*;
#(
  parameter int unsigned STAGES = 6,
  parameter int          X_INIT = 76   // round(125 * 0.6073)
) (
  input  logic       clk,
  input  logic       rst_n,  // asynchronous, active low
  input  logic       en,
  input  logic [7:0] phase_in,
  output cordic_t    cos_out,
  output cordic_t    sin_out
);
  quadrant_t quad_in, quad_dly;
  cordic_t   z0, c_pipe, s_pipe;

  cordic_preprocess u_pre (
    .phase_in (phase_in),
    .quadrant (quad_in),
    .z0       (z0)
  );

  delay_line #(.W(2), .DEPTH(STAGES)) u_delay (
    .clk (clk), .rst_n (rst_n), .en (en),
    .d   (quad_in),
    .q   (quad_dly)
  );

  cordic_pipeline #(.STAGES(STAGES)) u_pipe (
    .clk     (clk), .rst_n (rst_n), .en (en),
    .x0      (cordic_t'(X_INIT)),
    .y0      ('0),
    .z0      (z0),
    .cos_out (c_pipe),
    .sin_out (s_pipe)
  );

  cordic_postprocess u_post (
    .clk      (clk), .rst_n (rst_n), .en (en),
    .quadrant (quad_dly),
    .c_in     (c_pipe),
    .s_in     (s_pipe),
    .cos_out  (cos_out),
    .sin_out  (sin_out)
  );
endmodule
