// tb_optimized_cordic: sweeps all 256 phases (all four quadrants) and checks
// cos_out / sin_out against A cos(2 pi p / 256), A sin(...) computed here in
// floating point (A = 76 / K), within 7 LSB. Checks the seven-clock latency
// (six CORDIC stages plus the output register) with an isolated impulse.
module tb_optimized_cordic;
  import gmsk_pkg::*;
  localparam int STAGES  = 6;
  localparam int LATENCY = 7;
  localparam real PI = 3.14159265358979;
  // six iterations leave up to atan(2^-5) = 1.8 deg of angle (4 LSB at
  // amplitude 125); 8-bit truncation in the stages adds up to 3 LSB more
  localparam int  TOL = 7;

  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] phase = '0;
  cordic_t    co, so;
  int         pq [$];
  int         checks = 0, failures = 0;
  int         quad_hits [4] = '{0, 0, 0, 0};

  optimized_cordic dut (.clk (clk), .rst_n (rst_n), .en (en), .phase_in (phase), .cos_out (co), .sin_out (so));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k = 1.0, amp, ang;
    int  ec, es, lat;
    for (int i = 0; i < STAGES; i++) k = k * $cos($atan(2.0 ** (-i)));
    amp = 76.0 / k;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // latency: phase 64 (90 deg) for one clock after a run of phase 0
    en = 1'b1; phase = 8'd0;
    repeat (12) @(posedge clk);
    @(negedge clk) phase = 8'd128;  // 180 deg: cosine goes to -A
    lat = 0;
    for (int c = 1; c <= 12; c++) begin
      @(posedge clk); #1;
      if (c == 1) phase = 8'd0;
      if (co < -8'sd100 && lat == 0) lat = c;
    end
    checks++;
    if (lat != LATENCY) begin failures++; $display("latency %0d clocks, expected %0d", lat, LATENCY); end
    // full sweep, random enable
    for (int i = 0; i < 256 + LATENCY + 2; i++) begin
      @(negedge clk);
      en    = 1'($urandom % 5 != 0);
      phase = 8'(i);
      @(posedge clk);
      if (en) begin
        pq.push_back(i % 256);
        if (pq.size() >= LATENCY) begin
          int p;
          p = pq.pop_front();
          #1;
          ang = 2.0 * PI * p / 256.0;
          ec  = $rtoi(amp * $cos(ang) + (amp * $cos(ang) >= 0 ? 0.5 : -0.5));
          es  = $rtoi(amp * $sin(ang) + (amp * $sin(ang) >= 0 ? 0.5 : -0.5));
          checks++;
          quad_hits[p / 64]++;
          if (int'(co) - ec > TOL || ec - int'(co) > TOL || int'(so) - es > TOL || es - int'(so) > TOL) begin
            failures++;
            $display("phase %0d: got (%0d,%0d) expected (%0d,%0d)", p, co, so, ec, es);
          end
        end
      end
    end
    checks++;
    if (quad_hits[0] == 0 || quad_hits[1] == 0 || quad_hits[2] == 0 || quad_hits[3] == 0) begin
      failures++; $display("not all quadrants checked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
