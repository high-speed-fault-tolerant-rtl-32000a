// eic_erasure_tb: self-checking testbench of the technique-2 corrector.
//
// Random data-FFT outputs b1..b4 are drawn and the redundant FFT outputs are
// set to the exact group sums f0 = b1+b2+b3, f1 = b1+b2+b4, f2 = b1+b3+b4.
// Every one of the 16 erasure patterns is applied: the flagged FFTs get
// garbage, and the outputs must be restored exactly for up to two flags,
// with uncorrectable low; with three or four flags uncorrectable must be
// high and unflagged FFTs unchanged. n_err must count the flags.
module eic_erasure_tb;
  import ftfft_pkg::*;
  import ftfft_ref_pkg::*;

  localparam int unsigned W  = IW_DEFAULT + 4 + FRAC_DEFAULT;
  localparam int unsigned RW = W + 2;

  logic signed [W-1:0]  b_re [NFFT][N], b_im [NFFT][N], w_re [NFFT][N], w_im [NFFT][N];
  logic signed [RW-1:0] f_re [NCHK][N], f_im [NCHK][N];
  logic [NFFT-1:0] e;
  logic [2:0] n_err;
  logic uncorrectable;
  int checks = 0, failures = 0;
  int corrected2 = 0;

  eic_erasure #(.W(W), .RW(RW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint vr [4][8], vi [4][8];
    int nf;
    for (int t = 0; t < 320; t++) begin
      for (int k = 0; k < 8; k++) begin
        for (int i = 0; i < 4; i++) begin
          vr[i][k] = rand_s(W - 1);
          vi[i][k] = rand_s(W - 1);
          b_re[i][k] = W'(vr[i][k]);
          b_im[i][k] = W'(vi[i][k]);
        end
        f_re[0][k] = RW'(vr[0][k] + vr[1][k] + vr[2][k]);
        f_im[0][k] = RW'(vi[0][k] + vi[1][k] + vi[2][k]);
        f_re[1][k] = RW'(vr[0][k] + vr[1][k] + vr[3][k]);
        f_im[1][k] = RW'(vi[0][k] + vi[1][k] + vi[3][k]);
        f_re[2][k] = RW'(vr[0][k] + vr[2][k] + vr[3][k]);
        f_im[2][k] = RW'(vi[0][k] + vi[2][k] + vi[3][k]);
      end
      e = 4'(t % 16);
      nf = $countones(e);
      for (int i = 0; i < 4; i++)
        if (e[i])
          for (int k = 0; k < 8; k++) begin
            b_re[i][k] = W'(rand_s(W));
            b_im[i][k] = W'(rand_s(W));
          end
      #1;
      checks++;
      if (n_err !== 3'(nf) || uncorrectable !== (nf > 2)) begin
        failures++;
        $display("flags %b: n_err %0d unc %b", e, n_err, uncorrectable);
      end
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (nf <= 2 || !e[i]) begin
            if (longint'(w_re[i][k]) != vr[i][k] || longint'(w_im[i][k]) != vi[i][k]) begin
              failures++;
              if (failures < 10) $display("flags %b fft %0d bin %0d wrong", e, i, k);
            end
          end
        end
      if (nf == 2) corrected2++;
    end
    checks++;
    if (corrected2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
