// tb_integrator: random input bits on randomly spaced strobes; the output
// must follow y[k] = x[k] ^ y[k-4] (modulo-2 sum with the oldest of four
// registers) and hold between strobes.
module tb_integrator;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, din = 1'b0, yout;
  logic hist [$];
  int   checks = 0, failures = 0;

  integrator dut (.clk (clk), .rst_n (rst_n), .tick (tick), .data_in (din), .int_out (yout));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) hist.push_back(1'b0);  // reset state
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      tick = 1'($urandom % 2 == 0);
      din  = 1'($urandom);
      @(posedge clk);
      if (tick) hist.push_back(din ^ hist[hist.size() - 4]);
      #1;
      checks++;
      if (yout !== hist[hist.size() - 1]) begin
        failures++;
        $display("step %0d: got %0b expected %0b", i, yout, hist[hist.size() - 1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
