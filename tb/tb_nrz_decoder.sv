// tb_nrz_decoder: random encoded bits with randomly spaced strobes; the
// output must be the XOR of the last two sampled bits, and decoding a
// differentially encoded stream must give back the original data.
module tb_nrz_decoder;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, din = 1'b0, dout;
  logic prev = 1'b0, model = 1'b0, enc = 1'b0, data = 1'b0;
  int   checks = 0, failures = 0;

  nrz_decoder dut (.clk (clk), .rst_n (rst_n), .tick (tick), .data_in (din), .dec_out (dout));
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
      if (tick) begin
        data = 1'($urandom);
        enc  = enc ^ data;   // differential encoding of the data
      end
      din = tick ? enc : 1'($urandom);
      @(posedge clk);
      if (tick) begin
        model = din ^ prev;
        prev  = din;
      end
      #1;
      checks++;
      if (dout !== model) begin
        failures++;
        $display("step %0d: got %0b expected %0b", i, dout, model);
      end
      if (tick) begin
        checks++;
        if (dout !== data) begin
          failures++;
          $display("step %0d: decoded %0b, data was %0b", i, dout, data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
