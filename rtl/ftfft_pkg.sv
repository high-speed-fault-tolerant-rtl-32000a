// ftfft_pkg: constants shared by the fault-tolerant parallel FFT design.
//
// The design protects four 8-point FFTs that run in parallel on different
// input frames. The constants here fix the frame size (8 points, the size
// the design is specified for), the number of protected FFTs (4) and of
// check/redundant channels (3), and give the fixed-point twiddle constant
// used by fft8. TWIDDLE_C(F) = round(2^F / sqrt(2)) is computed with an
// integer square root so that no table of numbers is needed.
package ftfft_pkg;

  localparam int unsigned N     = 8;  // points per FFT frame
  localparam int unsigned NFFT  = 4;  // protected (data) FFTs
  localparam int unsigned NCHK  = 3;  // parity checks / redundant FFTs

  // Default widths: 32-bit input samples (real and imaginary part each),
  // 16 fractional bits carried by the twiddle products.
  localparam int unsigned IW_DEFAULT = 32;
  localparam int unsigned FRAC_DEFAULT = 16;

  // Membership of the data FFTs in the three parity groups:
  //   group 0: FFT1+FFT2+FFT3, group 1: FFT1+FFT2+FFT4, group 2: FFT1+FFT3+FFT4.
  // Bit i of GROUP[g] is set when data FFT i (0-based) belongs to group g.
  localparam logic [NFFT-1:0] GROUP [NCHK] = '{4'b0111, 4'b1011, 4'b1101};

  // round(2^f / sqrt(2)) = round(sqrt(2^(2f-1))), for 1 <= f <= 30.
  function automatic longint unsigned twiddle_c(input int unsigned f);
    longint unsigned v, s, b;
    v = 64'd1 << (2 * f - 1);
    s = 0;
    for (int i = 31; i >= 0; i--) begin
      b = s | (64'd1 << i);
      if (b * b <= v) s = b;
    end
    // round to nearest: s+1 when (s + 0.5)^2 <= v
    if ((4 * s * s + 4 * s + 1) <= 4 * v) s = s + 1;
    return s;
  endfunction

endpackage
