// eic_erasure: error indicator and corrector of technique 2.
//
// Each of the four data FFTs has its own partial-sum check, so the faulty
// FFTs are known (flags e[i]); they are treated as erasures. Three redundant
// FFTs transform the group sums, giving f[0] = B1+B2+B3, f[1] = B1+B2+B4 and
// f[2] = B1+B3+B4 (ftfft_pkg::GROUP). Each erased output is rebuilt from a
// group equation in which it is the only unknown:
//   B_m = f[g] - (sum of the other members of group g)
// This is done in two rounds. In the first, every erased FFT that is the only
// erased member of some group is solved; in the second the remaining one uses
// the value just rebuilt. This corrects any one or any two faulty data FFTs
// (for FFT1 and FFT2 both faulty, FFT1 comes from group {1,3,4} and then FFT2
// from group {1,2,3}). With three or four flags set uncorrectable is raised
// and the unsolved outputs pass unchanged. n_err counts the flags. Purely
// combinational. The erasure scheme follows the design specification; the
// two-round ordering and the flag outputs are this implementation's choices.
module eic_erasure
  import ftfft_pkg::*;
#(
  parameter int unsigned W  = IW_DEFAULT + 4 + FRAC_DEFAULT, // data FFT output width
  parameter int unsigned RW = W + 2                          // redundant FFT output width
) (
  input  logic signed [W-1:0]  b_re [NFFT][N],
  input  logic signed [W-1:0]  b_im [NFFT][N],
  input  logic signed [RW-1:0] f_re [NCHK][N],
  input  logic signed [RW-1:0] f_im [NCHK][N],
  input  logic [NFFT-1:0]      e,
  output logic signed [W-1:0]  w_re [NFFT][N],
  output logic signed [W-1:0]  w_im [NFFT][N],
  output logic [2:0]           n_err,
  output logic                 uncorrectable
);

  typedef logic signed [RW+1:0] acc_t;

  acc_t v_re [NFFT][N];
  acc_t v_im [NFFT][N];
  logic [NFFT-1:0] known;
  logic [NFFT-1:0] unk;
  int unsigned     m;

  always_comb begin
    for (int i = 0; i < NFFT; i++)
      for (int k = 0; k < N; k++) begin
        v_re[i][k] = acc_t'(b_re[i][k]);
        v_im[i][k] = acc_t'(b_im[i][k]);
      end
    known = ~e;
    unk   = '0;
    m     = 0;
    for (int round = 0; round < 2; round++) begin
      for (int g = 0; g < NCHK; g++) begin
        unk = GROUP[g] & ~known;
        if ($countones(unk) == 1) begin
          m = 0;
          for (int i = 0; i < NFFT; i++) if (unk[i]) m = i;
          for (int k = 0; k < N; k++) begin
            v_re[m][k] = acc_t'(f_re[g][k]);
            v_im[m][k] = acc_t'(f_im[g][k]);
            for (int j = 0; j < NFFT; j++) begin
              if (GROUP[g][j] && (j != m)) begin
                v_re[m][k] = v_re[m][k] - v_re[j][k];
                v_im[m][k] = v_im[m][k] - v_im[j][k];
              end
            end
          end
          known[m] = 1'b1;
        end
      end
    end
    for (int i = 0; i < NFFT; i++)
      for (int k = 0; k < N; k++) begin
        w_re[i][k] = W'(v_re[i][k]);
        w_im[i][k] = W'(v_im[i][k]);
      end
    n_err         = 3'($countones(e));
    uncorrectable = (known != '1);
  end

endmodule
