// tb_cordic_pipeline: streams one first-quadrant angle per clock through the
// six-stage pipeline with X_0 = 76, Y_0 = 0 and checks, STAGES clocks later,
// that X and Y are within 7 LSB of 76/K * cos and sin of the angle, computed
// here in floating point (K = prod cos(atan 2^-i)). Also checks the latency
// (no output change before STAGES clocks) and that a stalled enable holds
// the pipeline.
module tb_cordic_pipeline;
  import gmsk_pkg::*;
  localparam int STAGES = 6;
  localparam real PI = 3.14159265358979;
  // six iterations leave up to atan(2^-5) = 1.8 deg of angle (4 LSB at
  // amplitude 125); 8-bit truncation in the stages adds up to 3 LSB more
  localparam int  TOL = 7;

  logic    clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  cordic_t z0 = '0, xo, yo;
  int      zq [$];
  int      checks = 0, failures = 0;

  cordic_pipeline #(.STAGES(STAGES)) dut (
    .clk (clk), .rst_n (rst_n), .en (en),
    .x0 (8'sd76), .y0 (8'sd0), .z0 (z0), .cos_out (xo), .sin_out (yo)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k = 1.0, amp, ang;
    int  ex, ey, z;
    for (int i = 0; i < STAGES; i++) k = k * $cos($atan(2.0 ** (-i)));
    amp = 76.0 / k;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // latency: a single angle, output must appear after exactly STAGES clocks
    z0 = 8'sd64; en = 1'b1;
    for (int c = 1; c <= STAGES; c++) begin
      @(posedge clk); #1;
      if (c == 1) z0 = 8'sd0;
      if (c < STAGES) begin
        checks++;
        if (xo == 8'sd0 && yo == 8'sd0) ; else if (c < STAGES) begin
          failures++; $display("output changed after %0d clocks", c);
        end
      end
    end
    checks++;
    if (xo < 8'sd80 || yo < 8'sd80) begin failures++; $display("latency: 45 deg not out after %0d clocks (%0d,%0d)", STAGES, xo, yo); end
    // stream of angles 0..127
    for (int i = 0; i < 128 + STAGES; i++) begin
      @(negedge clk);
      en = (i < 20) ? 1'b1 : 1'($urandom % 4 != 0);
      z  = i % 128;
      z0 = cordic_t'(z);
      @(posedge clk);
      if (en) begin
        zq.push_back(z);
        if (zq.size() >= STAGES) begin
          int zz;
          zz = zq.pop_front();
          #1;
          ang = zz * PI / 256.0;  // 128 units = 90 degrees
          ex  = $rtoi(amp * $cos(ang) + 0.5);
          ey  = $rtoi(amp * $sin(ang) + 0.5);
          checks++;
          if (int'(xo) - ex > TOL || ex - int'(xo) > TOL || int'(yo) - ey > TOL || ey - int'(yo) > TOL) begin
            failures++;
            $display("z=%0d: got (%0d,%0d) expected (%0d,%0d)", zz, xo, yo, ex, ey);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
