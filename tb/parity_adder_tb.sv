// parity_adder_tb: self-checking testbench of the parity adders.
//
// Applies random frames, including full-range extremes, to the four
// channels and compares the three group sums {1,2,3}, {1,2,4}, {1,3,4} and
// the four-way sum of every point with sums formed here in 64-bit integers.
module parity_adder_tb;
  import ftfft_pkg::*;
  import ftfft_ref_pkg::*;

  localparam int unsigned W = IW_DEFAULT;
  logic signed [W-1:0] d_re [NFFT][N], d_im [NFFT][N];
  logic signed [W+1:0] g_re [NCHK][N], g_im [NCHK][N], all_re [N], all_im [N];
  int checks = 0, failures = 0;

  parity_adder #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // members of each group, written out independently of the package table
  int members [3][3] = '{'{0, 1, 2}, '{0, 1, 3}, '{0, 2, 3}};

  initial begin
    longint vr [4][8], vi [4][8], er, ei;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < 8; k++) begin
          if (t < 2) begin
            vr[i][k] = (t == 0) ? (longint'(1) <<< (W-1)) - 1 : -(longint'(1) <<< (W-1));
            vi[i][k] = -vr[i][k] - 1;
          end else begin
            vr[i][k] = rand_s(W);
            vi[i][k] = rand_s(W);
          end
          d_re[i][k] = W'(vr[i][k]);
          d_im[i][k] = W'(vi[i][k]);
        end
      #1;
      for (int k = 0; k < 8; k++) begin
        for (int g = 0; g < 3; g++) begin
          er = 0; ei = 0;
          for (int m = 0; m < 3; m++) begin
            er += vr[members[g][m]][k];
            ei += vi[members[g][m]][k];
          end
          checks++;
          if (longint'(g_re[g][k]) != er || longint'(g_im[g][k]) != ei) begin
            failures++;
            if (failures < 10) $display("t %0d group %0d point %0d mismatch", t, g, k);
          end
        end
        er = vr[0][k] + vr[1][k] + vr[2][k] + vr[3][k];
        ei = vi[0][k] + vi[1][k] + vi[2][k] + vi[3][k];
        checks++;
        if (longint'(all_re[k]) != er || longint'(all_im[k]) != ei) begin
          failures++;
          if (failures < 10) $display("t %0d all-sum point %0d mismatch", t, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
