// tb_nrz_encoder: random data with randomly spaced bit strobes; the output
// must follow e = d ^ e_prev on every strobe and hold between strobes.
module tb_nrz_encoder;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, din = 1'b0, eout;
  logic model = 1'b0;
  int   checks = 0, failures = 0;

  nrz_encoder dut (.clk (clk), .rst_n (rst_n), .tick (tick), .data_in (din), .enc_out (eout));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      tick = 1'($urandom % 3 == 0);
      din  = 1'($urandom);
      @(posedge clk);
      if (tick) model = model ^ din;
      #1;
      checks++;
      if (eout !== model) begin
        failures++;
        $display("step %0d: got %0b expected %0b", i, eout, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
