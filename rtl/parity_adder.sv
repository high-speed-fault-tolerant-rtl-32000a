// parity_adder: forms the parity combinations of four parallel FFT frames.
//
// Given the same bin (or sample) k of the four data channels d1..d4, it
// produces the three group sums used by the checks and redundant FFTs,
//   g[0] = d1 + d2 + d3,  g[1] = d1 + d2 + d4,  g[2] = d1 + d3 + d4,
// and the sum of all four, all = d1 + d2 + d3 + d4, for every one of the N
// complex points. The group membership is ftfft_pkg::GROUP. On the input side
// these sums feed the redundant/parity FFTs and the input half of the
// partial-sum checks; on the output side (technique 1) they form the combined
// FFT outputs B5..B7 that the checks compare against. Purely combinational.
// Outputs are two bits wider than the inputs, so nothing overflows. The
// equations follow the design specification; the widths are this
// implementation's choice.
module parity_adder
  import ftfft_pkg::*;
#(
  parameter int unsigned W = IW_DEFAULT
) (
  input  logic signed [W-1:0]   d_re   [NFFT][N],
  input  logic signed [W-1:0]   d_im   [NFFT][N],
  output logic signed [W+1:0]   g_re   [NCHK][N],
  output logic signed [W+1:0]   g_im   [NCHK][N],
  output logic signed [W+1:0]   all_re [N],
  output logic signed [W+1:0]   all_im [N]
);

  always_comb begin
    for (int k = 0; k < N; k++) begin
      for (int g = 0; g < NCHK; g++) begin
        g_re[g][k] = '0;
        g_im[g][k] = '0;
        for (int i = 0; i < NFFT; i++) begin
          if (GROUP[g][i]) begin
            g_re[g][k] = g_re[g][k] + (W+2)'(d_re[i][k]);
            g_im[g][k] = g_im[g][k] + (W+2)'(d_im[i][k]);
          end
        end
      end
      all_re[k] = '0;
      all_im[k] = '0;
      for (int i = 0; i < NFFT; i++) begin
        all_re[k] = all_re[k] + (W+2)'(d_re[i][k]);
        all_im[k] = all_im[k] + (W+2)'(d_im[i][k]);
      end
    end
  end

endmodule
