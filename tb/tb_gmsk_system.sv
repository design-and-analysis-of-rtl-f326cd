// tb_gmsk_system: end-to-end test of the GMSK link at its default parameters.
//
// A random bit sequence is applied to gmsk_in, one bit per bit strobe. The
// decoded output must equal the input three bit periods later. Besides the
// bit comparison the bench counts how often each mechanism of the link
// occurs and fails if one never does: mark (1) and space (0) tone decisions in
// the FM demodulator, integrator-bit changes in both directions (which move
// the Gaussian-smoothed frequency), all four CORDIC quadrants in the
// modulator, positive and negative channel noise, and the bit period
// (SAMPLES_PER_BIT clocks between strobes). In the middle of every bit it
// also counts sign changes of the modulated output over 256 clocks: a 1 must
// give the 1.72 MHz tone (f_clk * 1127 / 65536, 8.8 sign changes) and a 0
// the 485 kHz tone (f_clk * 318 / 65536, 2.5 sign changes).
module tb_gmsk_system;
  import gmsk_pkg::*;

  localparam int SPB   = 512;   // default SAMPLES_PER_BIT of gmsk_system
  localparam int NBITS = 80;
  localparam int LAT   = 3;     // bit periods from input to output
  localparam int WARM  = 8;     // strobes before comparing

  logic    clk = 1'b0, rst_n = 1'b0, en = 1'b0, start = 1'b0, gmsk_in = 1'b0;
  logic    gmsk_out, bit_tick, demod_bit;
  sample_t gmsk_mod_out, chan_out;
  int      checks = 0, failures = 0;
  int      n_mark = 0, n_space = 0, n_rise = 0, n_fall = 0, n_noise_pos = 0, n_noise_neg = 0;
  int      quad_seen [4] = '{0, 0, 0, 0};
  logic    sent [NBITS + 8];
  int      ntick = 0, last_tick_cycle = 0, cycle = 0;
  logic    prev_int = 1'b0;
  int      since_tick = 0, win_flips = 0, n_tone1 = 0, n_tone0 = 0;
  int      sum_flips1 = 0, sum_flips0 = 0;
  logic    win_bit = 1'b0, prev_pos = 1'b0;
  localparam int WIN0 = SPB / 4, WLEN = 256;

  gmsk_system dut (
    .clk (clk), .rst_n (rst_n), .en (en), .start (start), .gmsk_in (gmsk_in), .amp (5'd16),
    .gmsk_out (gmsk_out), .gmsk_mod_out (gmsk_mod_out), .chan_out (chan_out),
    .bit_tick (bit_tick), .demod_bit (demod_bit)
  );

  always #5 clk = ~clk;  // 100 MHz

  // watchdog
  initial begin
    repeat ((NBITS + 20) * SPB) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled every clock
  always @(posedge clk) if (rst_n && en) begin
    cycle++;
    quad_seen[dut.u_fm_mod.phase_in[7:6]]++;
    if (dut.u_channel.noise > 0) n_noise_pos++;
    if (dut.u_channel.noise < 0) n_noise_neg++;
    if (dut.int_bit && !prev_int) n_rise++;
    if (!dut.int_bit && prev_int) n_fall++;
    prev_int <= dut.int_bit;
    // tone measurement window inside each bit
    since_tick = bit_tick ? 0 : since_tick + 1;
    if (since_tick == WIN0) begin
      win_bit   = dut.int_bit;
      win_flips = 0;
    end else if (since_tick > WIN0 && since_tick <= WIN0 + WLEN) begin
      if ((gmsk_mod_out >= 0) != prev_pos) win_flips++;
      if (since_tick == WIN0 + WLEN && ntick >= 2) begin
        checks++;
        if (win_bit) begin
          n_tone1++; sum_flips1 += win_flips;
          if (win_flips < 8 || win_flips > 10) begin
            failures++; $display("strobe %0d: %0d sign changes for a 1, expected 8..10", ntick, win_flips);
          end
        end else begin
          n_tone0++; sum_flips0 += win_flips;
          if (win_flips < 2 || win_flips > 3) begin
            failures++; $display("strobe %0d: %0d sign changes for a 0, expected 2..3", ntick, win_flips);
          end
        end
      end
    end
    prev_pos = (gmsk_mod_out >= 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    en = 1'b1; start = 1'b1;
    gmsk_in = 1'($urandom);
    while (ntick < NBITS) begin
      @(posedge clk);
      if (bit_tick) begin
        // the value sampled on this strobe
        sent[ntick] = gmsk_in;
        // demodulator decision taken on this strobe
        if (ntick >= WARM) begin
          if (demod_bit) n_mark++; else n_space++;
          checks++;
          if (demod_bit !== dut.int_bit) begin
            failures++;
            $display("strobe %0d: FM decision %0b, transmitted integrator bit %0b", ntick, demod_bit, dut.int_bit);
          end
        end
        if (ntick > 0) begin
          checks++;
          if (cycle - last_tick_cycle != SPB) begin
            failures++;
            $display("bit period %0d clocks, expected %0d", cycle - last_tick_cycle, SPB);
          end
        end
        last_tick_cycle = cycle;
        @(negedge clk);
        if (ntick >= WARM + LAT) begin
          checks++;
          if (gmsk_out !== sent[ntick - LAT]) begin
            failures++;
            $display("strobe %0d: gmsk_out %0b, expected %0b", ntick, gmsk_out, sent[ntick - LAT]);
          end
        end
        ntick++;
        gmsk_in = 1'($urandom);
      end
    end
    $display("mark=%0d space=%0d rise=%0d fall=%0d quadrants=%0d/%0d/%0d/%0d noise+=%0d noise-=%0d",
             n_mark, n_space, n_rise, n_fall, quad_seen[0], quad_seen[1], quad_seen[2], quad_seen[3],
             n_noise_pos, n_noise_neg);
    if (n_tone1 > 0 && n_tone0 > 0)
      $display("measured tones at 100 MHz: %0.3f MHz for 1, %0.3f MHz for 0",
               100.0 * sum_flips1 / (2.0 * WLEN * n_tone1), 100.0 * sum_flips0 / (2.0 * WLEN * n_tone0));
    checks += 7;
    if (n_tone1 == 0 || n_tone0 == 0) begin failures++; $display("a tone was never measured"); end
    if (n_mark == 0)  begin failures++; $display("no mark decision");  end
    if (n_space == 0) begin failures++; $display("no space decision"); end
    if (n_rise == 0 || n_fall == 0) begin failures++; $display("integrator bit never changed both ways"); end
    if (quad_seen[0] == 0 || quad_seen[1] == 0 || quad_seen[2] == 0 || quad_seen[3] == 0) begin
      failures++; $display("a CORDIC quadrant was never used");
    end
    if (n_noise_pos == 0) begin failures++; $display("no positive noise"); end
    if (n_noise_neg == 0) begin failures++; $display("no negative noise"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
