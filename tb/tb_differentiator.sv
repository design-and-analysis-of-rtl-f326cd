// tb_differentiator: random bits on randomly spaced strobes; the output must
// follow z[k] = x[k] ^ x[k-4]. A second part feeds an integrated stream
// (y[k] = d[k] ^ y[k-4], computed here) and checks that the original data
// comes back.
module tb_differentiator;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, din = 1'b0, zout;
  logic xh [$];
  logic yh [$];
  logic data, model = 1'b0;
  int   nint = 0;  // strobes since the integrated stream started
  int   checks = 0, failures = 0;

  differentiator dut (.clk (clk), .rst_n (rst_n), .tick (tick), .data_in (din), .diff_out (zout));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin xh.push_back(1'b0); yh.push_back(1'b0); end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      tick = 1'($urandom % 2 == 0);
      data = 1'($urandom);
      if (i < 300) din = 1'($urandom);
      else if (tick) begin
        yh.push_back(data ^ yh[yh.size() - 4]);
        din = yh[yh.size() - 1];
        nint++;
      end
      @(posedge clk);
      if (tick) begin
        model = din ^ xh[xh.size() - 4];
        xh.push_back(din);
      end
      #1;
      checks++;
      if (zout !== model) begin
        failures++;
        $display("step %0d: got %0b expected %0b", i, zout, model);
      end
      if (i >= 300 && tick && nint > 4) begin
        checks++;
        if (zout !== data) begin
          failures++;
          $display("step %0d: recovered %0b, data %0b", i, zout, data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
