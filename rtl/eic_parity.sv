// eic_parity: error indicator and corrector of technique 1 (parity FFT).
//
// Inputs are the outputs b1..b4 of the four data FFTs, the output X of the
// parity FFT, which transforms x1+x2+x3+x4, and the three check flags p[g]
// of the partial-sum checks on the groups {1,2,3}, {1,2,4} and {1,3,4}.
// The flags form a syndrome. A faulty FFT i corrupts exactly the groups it
// belongs to, so each data FFT has its own syndrome:
//   FFT1 -> p = 111,  FFT2 -> 011,  FFT3 -> 101,  FFT4 -> 110   (p[2]p[1]p[0])
// On a match, err_loc marks that FFT and its output is rebuilt from the
// parity FFT by linearity: w_i = X - sum of the other three b_j. All other
// outputs pass unchanged. A nonzero syndrome that matches no FFT (one flag
// alone, a fault in a check, or several faulty FFTs) raises uncorrectable
// and passes all outputs unchanged. Purely combinational.
// The syndrome/parity-FFT scheme follows the design specification; the
// handling of unmatched syndromes is this implementation's choice.
module eic_parity
  import ftfft_pkg::*;
#(
  parameter int unsigned W  = IW_DEFAULT + 4 + FRAC_DEFAULT, // data FFT output width
  parameter int unsigned PW = W + 2                          // parity FFT output width
) (
  input  logic signed [W-1:0]  b_re [NFFT][N],
  input  logic signed [W-1:0]  b_im [NFFT][N],
  input  logic signed [PW-1:0] x_re [N],
  input  logic signed [PW-1:0] x_im [N],
  input  logic [NCHK-1:0]      p,
  output logic signed [W-1:0]  w_re [NFFT][N],
  output logic signed [W-1:0]  w_im [NFFT][N],
  output logic [NFFT-1:0]      err_loc,
  output logic                 err_detected,
  output logic                 uncorrectable
);

  typedef logic signed [PW+1:0] acc_t;

  logic [NCHK-1:0] col;
  acc_t r_re, r_im;

  always_comb begin
    err_loc = '0;
    r_re    = '0;
    r_im    = '0;
    col     = '0;
    for (int i = 0; i < NFFT; i++) begin
      for (int g = 0; g < NCHK; g++) col[g] = GROUP[g][i];
      if (p == col) err_loc[i] = 1'b1;
    end
    err_detected  = |p;
    uncorrectable = (|p) && (err_loc == '0);

    w_re = b_re;
    w_im = b_im;
    for (int i = 0; i < NFFT; i++) begin
      if (err_loc[i]) begin
        for (int k = 0; k < N; k++) begin
          r_re = acc_t'(x_re[k]);
          r_im = acc_t'(x_im[k]);
          for (int j = 0; j < NFFT; j++) begin
            if (j != i) begin
              r_re = r_re - acc_t'(b_re[j][k]);
              r_im = r_im - acc_t'(b_im[j][k]);
            end
          end
          w_re[i][k] = W'(r_re);
          w_im[i][k] = W'(r_im);
        end
      end
    end
  end

endmodule
