// eic_parity_tb: self-checking testbench of the technique-1 corrector.
//
// Random data-FFT outputs b1..b4 are drawn and the parity FFT output is set
// to their exact sum. For every syndrome value the testbench corrupts the
// FFT that syndrome names (if any) and checks that the corrupted FFT is
// rebuilt exactly, the others pass unchanged, err_loc names the right FFT,
// and err_detected / uncorrectable follow the syndrome. The syndrome table
// FFT1:111, FFT2:011, FFT3:101, FFT4:110 is written out here by hand.
module eic_parity_tb;
  import ftfft_pkg::*;
  import ftfft_ref_pkg::*;

  localparam int unsigned W  = IW_DEFAULT + 4 + FRAC_DEFAULT;
  localparam int unsigned PW = W + 2;

  logic signed [W-1:0]  b_re [NFFT][N], b_im [NFFT][N], w_re [NFFT][N], w_im [NFFT][N];
  logic signed [PW-1:0] x_re [N], x_im [N];
  logic [NCHK-1:0] p;
  logic [NFFT-1:0] err_loc;
  logic err_detected, uncorrectable;
  int checks = 0, failures = 0;

  eic_parity #(.W(W), .PW(PW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // syndrome (p[2]p[1]p[0]) -> faulty FFT, -1 for none
  function automatic int fft_of(input logic [2:0] s);
    case (s)
      3'b111:  return 0;
      3'b011:  return 1;
      3'b101:  return 2;
      3'b110:  return 3;
      default: return -1;
    endcase
  endfunction

  initial begin
    longint vr [4][8], vi [4][8], sr, si;
    int bad;
    for (int t = 0; t < 400; t++) begin
      for (int k = 0; k < 8; k++) begin
        sr = 0; si = 0;
        for (int i = 0; i < 4; i++) begin
          vr[i][k] = rand_s(W - 1);
          vi[i][k] = rand_s(W - 1);
          b_re[i][k] = W'(vr[i][k]);
          b_im[i][k] = W'(vi[i][k]);
          sr += vr[i][k];
          si += vi[i][k];
        end
        x_re[k] = PW'(sr);
        x_im[k] = PW'(si);
      end
      p = 3'(t % 8);
      bad = fft_of(p);
      if (bad >= 0)
        for (int k = 0; k < 8; k++) begin
          b_re[bad][k] = b_re[bad][k] ^ W'({$urandom, $urandom});
          b_im[bad][k] = b_im[bad][k] ^ W'($urandom);
        end
      #1;
      checks++;
      if (err_detected !== (p != 0) || uncorrectable !== (p != 0 && bad < 0) ||
          err_loc !== ((bad >= 0) ? 4'(1 << bad) : 4'b0)) begin
        failures++;
        $display("syndrome %b: loc %b det %b unc %b", p, err_loc, err_detected, uncorrectable);
      end
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (i == bad || bad < 0) begin
            if (longint'(w_re[i][k]) != ((i == bad) ? vr[i][k] : longint'(b_re[i][k])) ||
                longint'(w_im[i][k]) != ((i == bad) ? vi[i][k] : longint'(b_im[i][k]))) begin
              failures++;
              if (failures < 10) $display("syndrome %b fft %0d bin %0d wrong", p, i, k);
            end
          end else if (w_re[i][k] !== b_re[i][k] || w_im[i][k] !== b_im[i][k]) begin
            failures++;
            if (failures < 10) $display("syndrome %b fft %0d bin %0d changed", p, i, k);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
