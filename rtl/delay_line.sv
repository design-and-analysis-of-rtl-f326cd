// delay_line: a chain of DEPTH registers that delays a W-bit word by DEPTH
// enabled clocks. It serves as the delay unit of the optimized CORDIC, which
// carries the two quadrant bits alongside the CORDIC pipeline, and as the
// delay register of the FM demodulator. DEPTH must be at least 1.
module delay_line #(
  parameter int unsigned W     = 2,
  parameter int unsigned DEPTH = 6
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous, active low
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (en) begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];
endmodule
