// cordic_postprocess: postprocessing unit of the optimized CORDIC.
//
// It maps the first-quadrant result (c, s) = (cos t, sin t) back to the
// quadrant q carried by the delay unit, using
//   q = 00 [0,90):    ( c,  s)     q = 01 [90,180):  (-s,  c)
//   q = 10 [180,270): (-c, -s)     q = 11 [270,360): ( s, -c)
// and registers the result.
//
// Timing: one enabled clock.
module cordic_postprocess
  import gmsk_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,  // asynchronous, active low
  input  logic      en,
  input  quadrant_t quadrant,
  input  cordic_t   c_in,
  input  cordic_t   s_in,
  output cordic_t   cos_out,
  output cordic_t   sin_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cos_out <= '0;
      sin_out <= '0;
    end else if (en) begin
      unique case (quadrant)
        2'b00: begin cos_out <=  c_in; sin_out <=  s_in; end
        2'b01: begin cos_out <= -s_in; sin_out <=  c_in; end
        2'b10: begin cos_out <= -c_in; sin_out <= -s_in; end
        2'b11: begin cos_out <=  s_in; sin_out <= -c_in; end
      endcase
    end
  end
endmodule
