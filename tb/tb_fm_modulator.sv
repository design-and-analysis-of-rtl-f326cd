// tb_fm_modulator: holds the Gaussian input and the integrator bit constant
// in three settings and checks
//  - the tone frequency, by counting sign changes of the output over 16384
//    clocks: f = f_clk * fcw / 2^16 with fcw = 1127 (gauss = 32768, the 1.72
//    MHz tone at 100 MHz), 318 (gauss = 0, 485 kHz) and 722 (gauss = 16384),
//  - every output sample against 16 * A * cos (bit 1) or 16 * A * sin
//    (bit 0) of the CORDIC phase nine clocks earlier (seven CORDIC clocks,
//    one DFS clock, one adder clock), A = 76 / K, within 7 * 16 + 8.
module tb_fm_modulator;
  import gmsk_pkg::*;
  localparam real PI  = 3.14159265358979;
  localparam int  LAT = 9;
  localparam int  N   = 16384;

  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0, ibit = 1'b0;
  logic [15:0] gauss = '0;
  sample_t     mod;
  logic [7:0]  ph;
  int          checks = 0, failures = 0;

  fm_modulator dut (
    .clk (clk), .rst_n (rst_n), .en (en), .gauss_in (gauss), .int_bit (ibit),
    .amp (5'd16), .gmsk_mod (mod), .phase_in (ph)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (3 * (N + 200) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_tone(input logic [15:0] g, input logic b, input int fcw);
    int   phist [$];
    int   flips = 0, expect_flips, bad = 0;
    logic prev_pos = 1'b0;
    real  k = 1.0, amp, ang, e;
    for (int i = 0; i < 6; i++) k = k * $cos($atan(2.0 ** (-i)));
    amp = 16.0 * 76.0 / k;
    @(negedge clk);
    gauss = g; ibit = b;
    repeat (100) @(posedge clk);  // let the pipeline settle
    for (int t = 0; t < N; t++) begin
      @(posedge clk); #1;
      phist.push_back(int'(ph));
      if (t > 0 && ((mod >= 0) != prev_pos)) flips++;
      prev_pos = (mod >= 0);
      if (phist.size() > LAT) begin
        ang = 2.0 * PI * phist[phist.size() - 1 - LAT] / 256.0;
        e   = b ? amp * $cos(ang) : amp * $sin(ang);
        checks++;
        if (real'(mod) - e > 120.0 || e - real'(mod) > 120.0) begin
          bad++;
          failures++;
          if (bad < 5) $display("fcw %0d bit %0b: sample %0d, expected %f", fcw, b, mod, e);
        end
      end
    end
    expect_flips = 2 * N * fcw / 65536;
    checks++;
    if (flips < expect_flips - 3 || flips > expect_flips + 3) begin
      failures++;
      $display("fcw %0d: %0d sign changes, expected %0d", fcw, flips, expect_flips);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    en = 1'b1;
    run_tone(16'd32768, 1'b1, 1127);
    run_tone(16'd0,     1'b0, 318);
    run_tone(16'd16384, 1'b1, 722);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
