// cordic_pipeline: pipelined rotation-mode CORDIC, one stage per iteration.
//
// Stage i takes (X_i, Y_i, Z_i). Its sign S_i is the MSB of Z_i; with
// S_i = 0 the vector turns by +atan(2^-i):
//   X_{i+1} = X_i - (Y_i >>> i),  Y_{i+1} = Y_i + (X_i >>> i),  Z_{i+1} = Z_i - a_i
// and with S_i = 1 every sign flips. The elementary angles a_i are constants
// of each stage (gmsk_pkg::atan_z), so no ROM table is used. Starting from
// X_0 = K * A, Y_0 = 0, Z_0 = theta (first quadrant), the last stage gives
// X = A cos(theta) and Y = A sin(theta), K being the CORDIC gain
// compensation. Six stages, 8-bit words, sign taken from bit 7 of Z and the
// structure of each stage follow the design; the angle scaling of Z (128
// units = 90 degrees) is this implementation's choice.
//
// Timing: fully pipelined, one new angle per enabled clock, latency STAGES
// enabled clocks. Each stage is a register bank.
module cordic_pipeline
  import gmsk_pkg::*;
#(
  parameter int unsigned STAGES = 6
) (
  input  logic    clk,
  input  logic    rst_n,  // asynchronous, active low
  input  logic    en,
  input  cordic_t x0,
  input  cordic_t y0,
  input  cordic_t z0,
  output cordic_t cos_out, // X after the last stage
  output cordic_t sin_out  // Y after the last stage
);
  cordic_t x [STAGES+1];
  cordic_t y [STAGES+1];
  cordic_t z [STAGES+1];

  assign x[0] = x0;
  assign y[0] = y0;
  assign z[0] = z0;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    logic    s;      // rotation sign S_i
    cordic_t xs, ys; // shifted operands
    assign s  = z[i][CORDIC_W-1];
    assign xs = x[i] >>> i;
    assign ys = y[i] >>> i;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[i+1] <= '0;
        y[i+1] <= '0;
        z[i+1] <= '0;
      end else if (en) begin
        if (!s) begin
          x[i+1] <= x[i] - ys;
          y[i+1] <= y[i] + xs;
          z[i+1] <= z[i] - atan_z(i);
        end else begin
          x[i+1] <= x[i] + ys;
          y[i+1] <= y[i] - xs;
          z[i+1] <= z[i] + atan_z(i);
        end
      end
    end
  end

  assign cos_out = x[STAGES];
  assign sin_out = y[STAGES];
endmodule
