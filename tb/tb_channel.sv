// tb_channel: drives random 12-bit samples (including values near full
// scale) through the channel. A model here runs two LFSRs of
// G(x) = x^5 + x^2 + 1 by polynomial multiplication (seeds 1 and 22) and
// predicts each output: saturate(sample + ((a + b - 32) << 2)), one clock
// later. Also checks that the noise is bounded, takes both signs, averages
// near zero and that saturation happens at both rails.
module tb_channel;
  import gmsk_pkg::*;
  logic    clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  sample_t din = '0, dout;
  logic signed [7:0] noise;
  int      checks = 0, failures = 0, model = 0, npos = 0, nneg = 0, nsat_hi = 0, nsat_lo = 0;
  int      a = 1, b = 22, nsum = 0, nn = 0;

  channel dut (.clk (clk), .rst_n (rst_n), .en (en), .mod_in (din), .chan_out (dout), .noise (noise));
  always #5 clk = ~clk;

  // multiply a GF(2)[x]/G(x) element by x
  function automatic int mulx(int s);
    s = s << 1;
    if (s & 32) s = s ^ 32'h25;  // x^5 = x^2 + 1
    return s;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 800; i++) begin
      int nz, s;
      @(negedge clk);
      en  = 1'($urandom % 4 != 0);
      case (i % 8)
        0:       din = 12'sd2040;
        1:       din = -12'sd2045;
        default: din = sample_t'($urandom);
      endcase
      @(posedge clk);
      if (en) begin
        nz = (a + b - 32);
        s  = int'(din) + nz * 4;
        if (s > 2047)       begin model = 2047;  nsat_hi++; end
        else if (s < -2048) begin model = -2048; nsat_lo++; end
        else                model = s;
        if (nz > 0) npos++;
        if (nz < 0) nneg++;
        nsum += nz; nn++;
        a = mulx(a); b = mulx(b);
      end
      #1;
      checks++;
      if (int'(dout) != model) begin
        failures++;
        $display("step %0d: got %0d expected %0d", i, dout, model);
      end
    end
    checks += 3;
    if (npos == 0 || nneg == 0) begin failures++; $display("noise does not take both signs"); end
    if (nsat_hi == 0 || nsat_lo == 0) begin failures++; $display("saturation not exercised"); end
    if (nsum > nn * 3 || nsum < -nn * 3) begin failures++; $display("noise mean %0d/%0d too far from zero", nsum, nn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
