// tb_gaussian_filter: checks the coefficient set against a Gaussian computed
// here with $exp (sigma = 1.5 taps, sum 2^15, within 0.5 % of full scale per
// tap), then drives random bits and compares each output with the sum of
// the coefficients over the last eight input bits, one clock later. Also
// checks that a long run of ones settles at exactly 32768 and that the step
// response is symmetric (rises in eight samples).
module tb_gaussian_filter;
  localparam int TAPS = 8;
  localparam logic [15:0] COEF [TAPS] =
    '{16'd576, 16'd2187, 16'd5321, 16'd8300, 16'd8300, 16'd5321, 16'd2187, 16'd576};

  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0, din = 1'b0;
  logic [15:0] gout;
  logic        hist [$];
  int          checks = 0, failures = 0;

  gaussian_filter dut (.clk (clk), .rst_n (rst_n), .en (en), .data_in (din), .gauss_out (gout));
  always #5 clk = ~clk;

  function automatic int expect_out();
    int s = 0;
    for (int k = 0; k < TAPS; k++) if (hist[hist.size() - 1 - k]) s += COEF[k];
    return s;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real g [TAPS];
    real gs = 0.0;
    int  sum = 0;
    for (int k = 0; k < TAPS; k++) begin
      g[k] = $exp(-((k - 3.5) ** 2) / (2.0 * 1.5 * 1.5));
      gs += g[k];
    end
    for (int k = 0; k < TAPS; k++) begin
      real ideal = g[k] / gs * 32768.0;
      sum += COEF[k];
      checks++;
      if (ideal - COEF[k] > 164.0 || COEF[k] - ideal > 164.0) begin
        failures++;
        $display("coefficient %0d = %0d, Gaussian %f", k, COEF[k], ideal);
      end
    end
    checks++;
    if (sum != 32768) begin failures++; $display("coefficient sum %0d", sum); end

    for (int k = 0; k < TAPS; k++) hist.push_back(1'b0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    en = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en  = (i < 150) ? 1'b1 : 1'($urandom % 4 != 0);
      din = (i >= 100 && i < 120) ? 1'b1 : (i >= 120 && i < 140) ? 1'b0 : 1'($urandom);
      @(posedge clk);
      if (en) hist.push_back(din);
      #1;
      checks++;
      if (gout !== 16'(expect_out())) begin
        failures++;
        $display("step %0d: got %0d expected %0d", i, gout, expect_out());
      end
      if (i == 119) begin
        checks++;
        if (gout !== 16'd32768) begin failures++; $display("run of ones gives %0d", gout); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
