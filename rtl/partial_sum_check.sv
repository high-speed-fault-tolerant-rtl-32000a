// partial_sum_check: multiplier-free concurrent error check of one FFT.
//
// Instead of comparing sums of squares (Parseval), the check uses two sums
// that need only adders and that any correct N-point DFT satisfies exactly:
//   output side:  sum over k of Y[k]  =  N * x[0]
//   input side:   Y[0]                =  sum over n of x[n]
// Both hold for the real and the imaginary part. Because fft8 scales its
// result by 2^F, the input-side terms are shifted left by F before comparing.
// err is raised when any of the four differences exceeds THRESH in
// magnitude; with the exact fixed-point FFT of this design THRESH = 0. The
// check is linear, so it can be applied to a sum of FFT inputs and the sum of
// the matching FFT outputs (technique 1) as well as to a single FFT
// (technique 2). err_sum and err_dc tell which of the two equations failed.
// An error pattern that leaves both sums unchanged (for example +e in one bin
// and -e in another, none in bin 0) is not detected. Purely combinational.
// Using input- and output-side partial sums in place of sums of squares is
// the design specification's idea; these two particular sum identities and
// the threshold compare are this implementation's choice.
module partial_sum_check
  import ftfft_pkg::*;
#(
  parameter int unsigned XW     = IW_DEFAULT,                // time-domain width
  parameter int unsigned F      = FRAC_DEFAULT,              // FFT output scale 2^F
  parameter int unsigned YW     = IW_DEFAULT + 4 + FRAC_DEFAULT, // FFT output width
  parameter int unsigned THRESH = 0                          // tolerated |difference|
) (
  input  logic signed [XW-1:0] x_re [N],
  input  logic signed [XW-1:0] x_im [N],
  input  logic signed [YW-1:0] y_re [N],
  input  logic signed [YW-1:0] y_im [N],
  output logic                 err_sum,
  output logic                 err_dc,
  output logic                 err
);

  localparam int unsigned CW = ((YW + 3) > (XW + 3 + F) ? (YW + 3) : (XW + 3 + F)) + 2;
  typedef logic signed [CW-1:0] cw_t;

  cw_t sy_re, sy_im, sx_re, sx_im;
  cw_t d_sum_re, d_sum_im, d_dc_re, d_dc_im;

  function automatic logic over(input cw_t d);
    cw_t a;
    a = (d < 0) ? -d : d;
    return a > cw_t'(THRESH);
  endfunction

  always_comb begin
    sy_re = '0; sy_im = '0; sx_re = '0; sx_im = '0;
    for (int k = 0; k < N; k++) begin
      sy_re = sy_re + cw_t'(y_re[k]);
      sy_im = sy_im + cw_t'(y_im[k]);
      sx_re = sx_re + cw_t'(x_re[k]);
      sx_im = sx_im + cw_t'(x_im[k]);
    end
    d_sum_re = sy_re - (cw_t'(x_re[0]) * cw_t'(N) <<< F);
    d_sum_im = sy_im - (cw_t'(x_im[0]) * cw_t'(N) <<< F);
    d_dc_re  = cw_t'(y_re[0]) - (sx_re <<< F);
    d_dc_im  = cw_t'(y_im[0]) - (sx_im <<< F);
    err_sum  = over(d_sum_re) | over(d_sum_im);
    err_dc   = over(d_dc_re) | over(d_dc_im);
    err      = err_sum | err_dc;
  end

endmodule
