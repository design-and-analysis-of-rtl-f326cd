// tb_dfs: random 8-bit samples and amplitude words; each output, one
// enabled clock later, must be the product saturated to 12 bits. Includes
// the extremes (+-127/-128 times 31) that must saturate, and checks that a
// low enable holds the output.
module tb_dfs;
  import gmsk_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  cordic_t    win = '0;
  logic [4:0] amp = '0;
  sample_t    wout;
  int         model = 0, checks = 0, failures = 0, nsat = 0;

  dfs dut (.clk (clk), .rst_n (rst_n), .en (en), .wave_in (win), .amp (amp), .wave_out (wout));
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
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      en  = 1'($urandom % 4 != 0);
      win = (i < 4) ? ((i % 2) ? -8'sd128 : 8'sd127) : cordic_t'($urandom);
      amp = (i < 4) ? 5'd31 : (i < 300 ? 5'd16 : 5'($urandom));
      @(posedge clk);
      if (en) begin
        int p;
        p = int'(win) * int'(amp);
        if (p > 2047)       begin model = 2047;  nsat++; end
        else if (p < -2048) begin model = -2048; nsat++; end
        else                model = p;
      end
      #1;
      checks++;
      if (int'(wout) != model) begin
        failures++;
        $display("step %0d: got %0d expected %0d", i, wout, model);
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
