// tb_fm_demodulator: feeds the demodulator tones generated here in floating
// point, amplitude 1800 plus uniform noise of +-124, switching
// phase-continuously between the "1" tone (fcw 1127, 1.72 MHz at 100 MHz)
// and the "0" tone (fcw 318, 485 kHz) every 1500 clocks. The decision must
// equal the tone's bit over the last 1000 clocks of each segment and must
// have switched within 400 clocks of each tone change.
module tb_fm_demodulator;
  import gmsk_pkg::*;
  localparam real PI  = 3.14159265358979;
  localparam int  SEG = 1500;
  localparam int  NSEG = 12;

  logic    clk = 1'b0, rst_n = 1'b0, en = 1'b0, bout, flip;
  sample_t rx = '0;
  int      checks = 0, failures = 0, n_one = 0, n_zero = 0;

  fm_demodulator dut (
    .clk (clk), .rst_n (rst_n), .en (en), .chan_in (rx), .amp (5'd16),
    .bit_out (bout), .rx_flip (flip)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (SEG * NSEG + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real phase = 0.0;
    logic tone;
    int   first_ok;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    en = 1'b1;
    for (int sgm = 0; sgm < NSEG; sgm++) begin
      tone = (sgm % 2 == 0);
      first_ok = -1;
      for (int t = 0; t < SEG; t++) begin
        @(negedge clk);
        phase = phase + 2.0 * PI * (tone ? 1127.0 : 318.0) / 65536.0;
        if (phase > 2.0 * PI) phase = phase - 2.0 * PI;
        rx = sample_t'($rtoi(1800.0 * $cos(phase)) + int'($urandom % 249) - 124);
        @(posedge clk); #1;
        if (bout == tone && first_ok < 0) first_ok = t;
        if (sgm > 0 && t >= SEG - 1000) begin
          checks++;
          if (bout != tone) begin
            failures++;
            if (failures < 10) $display("segment %0d clock %0d: decision %0b, tone %0b", sgm, t, bout, tone);
          end
          if (bout) n_one++; else n_zero++;
        end
      end
      if (sgm > 0) begin
        checks++;
        if (first_ok < 0 || first_ok > 400) begin
          failures++;
          $display("segment %0d: decision switched after %0d clocks", sgm, first_ok);
        end
      end
    end
    checks++;
    if (n_one == 0 || n_zero == 0) begin failures++; $display("both decisions not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
