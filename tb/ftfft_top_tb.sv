// ftfft_top_tb: end-to-end testbench of the whole design at default sizes.
//
// Both techniques receive the same stream of random frame sets (four 8-point
// frames of 32-bit complex samples per clock, with occasional idle cycles).
// Each set gets an independent fault scenario per technique:
//   technique 1: none, one faulty data FFT (corrected), parity FFT fault
//                (no effect), TMR copy fault (outvoted), two faulty data
//                FFTs (detected);
//   technique 2: none, one or two faulty data FFTs (corrected), three
//                (flagged uncorrectable), redundant FFT fault (no effect),
//                TMR copy fault (outvoted).
// Corrected outputs are compared with the direct DFT of each frame, flags
// with the injected faults, and latency must be two clocks. Each mechanism
// is counted and one that never happened counts as a failure.
module ftfft_top_tb;
  import ftfft_pkg::*;
  import ftfft_ref_pkg::*;

  localparam int unsigned IW = IW_DEFAULT;
  localparam int unsigned F  = FRAC_DEFAULT;
  localparam int unsigned OW = IW + 4 + F;
  localparam int NF = 240;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IW-1:0] a_re [NFFT][N], a_im [NFFT][N];
  logic [NFFT:0]        t1_inj_en = '0;
  logic [NFFT+NCHK-1:0] t2_inj_en = '0;
  logic [2:0]    inj_bin = '0, t1_inj_tmr = '0, t2_inj_tmr = '0;
  logic [OW-1:0] inj_val = '0;
  logic t1_out_valid, t2_out_valid;
  logic signed [OW-1:0] t1_w_re [NFFT][N], t1_w_im [NFFT][N];
  logic signed [OW-1:0] t2_w_re [NFFT][N], t2_w_im [NFFT][N];
  logic [NCHK-1:0] t1_syndrome;
  logic [NFFT-1:0] t1_err_loc, t2_err_flags;
  logic [2:0] t2_n_err;
  logic t1_err_detected, t1_uncorrectable, t1_tmr_mismatch, t2_uncorrectable, t2_tmr_mismatch;
  int checks = 0, failures = 0;

  ftfft_top dut (
    .clk, .rst_n,
    .t1_in_valid(in_valid), .t1_a_re(a_re), .t1_a_im(a_im),
    .t1_inj_en, .t1_inj_bin(inj_bin), .t1_inj_val(inj_val), .t1_inj_tmr,
    .t1_out_valid, .t1_w_re, .t1_w_im, .t1_syndrome, .t1_err_loc,
    .t1_err_detected, .t1_uncorrectable, .t1_tmr_mismatch,
    .t2_in_valid(in_valid), .t2_a_re(a_re), .t2_a_im(a_im),
    .t2_inj_en, .t2_inj_bin(inj_bin), .t2_inj_val(inj_val), .t2_inj_tmr,
    .t2_out_valid, .t2_w_re, .t2_w_im, .t2_err_flags, .t2_n_err,
    .t2_uncorrectable, .t2_tmr_mismatch);

  always #5 clk = ~clk;

  initial begin
    repeat (NF * 3 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {M_STREAM, M_T1_CORR, M_T1_PARITY, M_T1_TMR, M_T1_DOUBLE,
                    M_T2_CORR1, M_T2_CORR2, M_T2_UNCORR, M_T2_RED, M_T2_TMR, M_NUM} mech_t;
  int mech [M_NUM];

  // technique-1 syndrome of each data FFT, written out by hand
  localparam logic [2:0] SYN [4] = '{3'b111, 3'b011, 3'b101, 3'b110};

  int         s1 [NF], s2 [NF];      // scenario per technique
  int         bad1 [NF];
  logic [3:0] badm2 [NF];
  bit         tmr1_in [NF], tmr2_in [NF];
  longint er [NF][4][8], ei [NF][4][8];

  task automatic new_frame(input int f);
    longint xr [8], xi [8], yr [8], yi [8];
    for (int i = 0; i < 4; i++) begin
      for (int n = 0; n < 8; n++) begin
        xr[n] = rand_s(IW);
        xi[n] = rand_s(IW);
        a_re[i][n] = IW'(xr[n]);
        a_im[i][n] = IW'(xi[n]);
      end
      dft8(xr, xi, F, yr, yi);
      er[f][i] = yr;
      ei[f][i] = yi;
    end
    s1[f] = $urandom % 5;            // 0 none 1 single 2 parity 3 tmr 4 double
    s2[f] = $urandom % 7;            // 0 none 1 single 2 double 3 triple 4 redundant 5 tmr 6 none
    bad1[f] = $urandom % 4;
    case (s2[f])
      1: badm2[f] = 4'(1 << ($urandom % 4));
      2: begin badm2[f] = 4'(1 << ($urandom % 4)); badm2[f] |= {badm2[f][0], badm2[f][3:1]}; end
      3: badm2[f] = ~4'(1 << ($urandom % 4));
      default: badm2[f] = 4'b0;
    endcase
  endtask

  task automatic set_fault(input int f);
    t1_inj_en = '0; t2_inj_en = '0; t1_inj_tmr = '0; t2_inj_tmr = '0;
    inj_bin = 3'($urandom);
    inj_val = OW'({$urandom, $urandom}) | OW'(1);
    case (s1[f])
      1: t1_inj_en[bad1[f]] = 1'b1;
      2: t1_inj_en[NFFT] = 1'b1;
      3: t1_inj_tmr[$urandom % 3] = 1'b1;
      4: begin t1_inj_en[bad1[f]] = 1'b1; t1_inj_en[(bad1[f] + 2) % 4] = 1'b1; end
      default: ;
    endcase
    t2_inj_en[NFFT-1:0] = badm2[f];
    if (s2[f] == 4) t2_inj_en[NFFT + $urandom % 3] = 1'b1;
    if (s2[f] == 5) t2_inj_tmr[$urandom % 3] = 1'b1;
  endtask

  function automatic bit frame_ok(input int f, input logic signed [OW-1:0] wr [NFFT][N],
                                  input logic signed [OW-1:0] wi [NFFT][N], input logic [3:0] skip);
    for (int i = 0; i < 4; i++)
      if (!skip[i])
        for (int k = 0; k < 8; k++)
          if (longint'(wr[i][k]) != er[f][i][k] || longint'(wi[i][k]) != ei[f][i][k]) return 0;
    return 1;
  endfunction

  task automatic check_t1(input int f);
    logic [2:0] syn;
    checks++;
    if (t1_tmr_mismatch !== (s1[f] == 3 || tmr1_in[f])) begin
      failures++; $display("t1 frame %0d tmr_mismatch %b", f, t1_tmr_mismatch);
    end
    if (s1[f] == 4) begin
      checks++;
      if (!t1_err_detected) begin failures++; $display("t1 frame %0d double not detected", f); end
      else mech[M_T1_DOUBLE]++;
      return;
    end
    syn = (s1[f] == 1) ? SYN[bad1[f]] : 3'b000;
    checks++;
    if (t1_syndrome !== syn || t1_err_loc !== ((s1[f] == 1) ? 4'(1 << bad1[f]) : 4'b0) ||
        t1_uncorrectable) begin
      failures++; $display("t1 frame %0d flags wrong", f);
    end
    checks++;
    if (!frame_ok(f, t1_w_re, t1_w_im, 4'b0)) begin
      failures++; $display("t1 frame %0d scenario %0d outputs wrong", f, s1[f]);
    end else begin
      if (s1[f] == 1) mech[M_T1_CORR]++;
      if (s1[f] == 2) mech[M_T1_PARITY]++;
      if (s1[f] == 3) mech[M_T1_TMR]++;
    end
  endtask

  task automatic check_t2(input int f);
    checks++;
    if (t2_tmr_mismatch !== (s2[f] == 5 || tmr2_in[f])) begin
      failures++; $display("t2 frame %0d tmr_mismatch %b", f, t2_tmr_mismatch);
    end
    checks++;
    if (t2_err_flags !== badm2[f] || t2_n_err !== 3'($countones(badm2[f])) ||
        t2_uncorrectable !== (s2[f] == 3)) begin
      failures++; $display("t2 frame %0d flags wrong", f);
    end
    checks++;
    if (!frame_ok(f, t2_w_re, t2_w_im, (s2[f] == 3) ? badm2[f] : 4'b0)) begin
      failures++; $display("t2 frame %0d scenario %0d outputs wrong", f, s2[f]);
    end else begin
      if (s2[f] == 1) mech[M_T2_CORR1]++;
      if (s2[f] == 2) mech[M_T2_CORR2]++;
      if (s2[f] == 3 && t2_uncorrectable) mech[M_T2_UNCORR]++;
      if (s2[f] == 4) mech[M_T2_RED]++;
      if (s2[f] == 5) mech[M_T2_TMR]++;
    end
  endtask

  initial begin
    int f, cyc, g, pending [$], start [$];
    bit prev_valid;
    for (int i = 0; i < 4; i++) for (int n = 0; n < 8; n++) begin a_re[i][n] = '0; a_im[i][n] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    f = 0;
    cyc = 0;
    prev_valid = 0;
    while (f < NF || pending.size() > 0 || cyc < 4) begin
      @(negedge clk);
      checks++;
      if (t1_out_valid !== t2_out_valid) begin failures++; $display("out_valid differ"); end
      if (t1_out_valid) begin
        if (pending.size() == 0) begin failures++; $display("spurious out_valid"); end
        else begin
          g = pending.pop_front();
          checks++;
          if (cyc - start.pop_front() != 2) begin failures++; $display("frame %0d latency", g); end
          if (prev_valid) mech[M_STREAM]++;
          check_t1(g);
          check_t2(g);
        end
      end
      prev_valid = t1_out_valid;
      if (in_valid) set_fault(f - 1);
      else begin t1_inj_en = '0; t2_inj_en = '0; t1_inj_tmr = '0; t2_inj_tmr = '0; end
      if (f < NF && (cyc % 29) != 28) begin
        new_frame(f);
        tmr1_in[f] = (t1_inj_tmr != 0);
        tmr2_in[f] = (t2_inj_tmr != 0);
        in_valid = 1;
        pending.push_back(f);
        start.push_back(cyc);
        f++;
      end else in_valid = 0;
      cyc++;
    end
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      if (mech[m] == 0) begin failures++; $display("mechanism %s never happened", mech_t'(m)); end
    end
    $display("back-to-back results %0d", mech[M_STREAM]);
    $display("t1: corrected %0d, parity-FFT fault masked %0d, TMR fault masked %0d, double detected %0d",
             mech[M_T1_CORR], mech[M_T1_PARITY], mech[M_T1_TMR], mech[M_T1_DOUBLE]);
    $display("t2: corrected one %0d, corrected two %0d, uncorrectable %0d, redundant-FFT fault masked %0d, TMR fault masked %0d",
             mech[M_T2_CORR1], mech[M_T2_CORR2], mech[M_T2_UNCORR], mech[M_T2_RED], mech[M_T2_TMR]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
