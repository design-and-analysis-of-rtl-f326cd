// gmsk_pkg: types and constants shared by the GMSK modulator, channel and
// demodulator.
//
// The CORDIC works on 8-bit two's-complement X, Y and Z words, as in the
// design's figure of the optimized CORDIC (8-bit phase in, 8-bit sine and
// cosine out). Z is scaled so that 128 units are 90 degrees; a first-quadrant
// angle therefore fits in 0..127 and the sign bit (bit 7) of Z decides the
// rotation direction of each stage. The per-stage angles atan(2^-i) are
// constants in these units, so no ROM table is needed: round(atan(2^-i) *
// 128 / (pi/2)). The modulated waveform and the channel output are 12-bit
// signed samples.
package gmsk_pkg;

  localparam int unsigned CORDIC_W  = 8;   // width of X, Y, Z and the phase
  localparam int unsigned SAMPLE_W  = 12;  // modulated / channel sample width
  localparam int unsigned GAUSS_W   = 16;  // Gaussian filter output width

  typedef logic signed [CORDIC_W-1:0] cordic_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [1:0]          quadrant_t;

  // Elementary rotation angle of stage i, in units of (90/128) degree.
  function automatic cordic_t atan_z(input int unsigned i);
    case (i)
      0:       return 8'sd64;  // 45.000 deg
      1:       return 8'sd38;  // 26.565 deg
      2:       return 8'sd20;  // 14.036 deg
      3:       return 8'sd10;  //  7.125 deg
      4:       return 8'sd5;   //  3.576 deg
      5:       return 8'sd3;   //  1.790 deg
      6:       return 8'sd1;   //  0.895 deg
      default: return 8'sd1;   //  0.448 deg
    endcase
  endfunction

endpackage
