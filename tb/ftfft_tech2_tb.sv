// ftfft_tech2_tb: end-to-end testbench of technique 2 (per-FFT checks and
// three redundant FFTs).
//
// Streams random sets of four frames, one set per clock with a few idle
// gaps, through the subsystem at its default sizes. Each set gets one
// scenario: no fault; one, two or three faulty data FFTs; a fault in one
// redundant FFT only (must have no effect); a fault in one TMR copy, alone or
// with a data-FFT fault (must be outvoted and reported). The per-FFT flags
// and the error count must name exactly the faulty FFTs. With up to two
// faulty FFTs every output must equal the direct DFT of its frame; with three
// uncorrectable must be raised and the healthy FFT must pass unchanged. Each
// result must appear exactly two clocks after its frame, and every scenario
// must occur.
module ftfft_tech2_tb;
  import ftfft_pkg::*;
  import ftfft_ref_pkg::*;

  localparam int unsigned IW = IW_DEFAULT;
  localparam int unsigned F  = FRAC_DEFAULT;
  localparam int unsigned OW = IW + 4 + F;
  localparam int NF = 300;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [IW-1:0] a_re [NFFT][N], a_im [NFFT][N];
  logic [NFFT+NCHK-1:0] inj_en = '0;
  logic [2:0] inj_bin = '0;
  logic [OW-1:0] inj_val = '0;
  logic [2:0] inj_tmr = '0;
  logic signed [OW-1:0] w_re [NFFT][N], w_im [NFFT][N];
  logic [NFFT-1:0] err_flags;
  logic [2:0] n_err;
  logic uncorrectable, tmr_mismatch;
  int checks = 0, failures = 0;

  ftfft_tech2 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NF * 3 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {CLEAN, SINGLE, REDUNDANT, TMR, TMR_SINGLE, DOUBLE, TRIPLE, NSCEN} scen_t;
  scen_t scen [NF];
  logic [3:0] badm [NF];
  longint er [NF][4][8], ei [NF][4][8];
  int count [NSCEN];
  bit tmr_in [NF];   // a TMR fault was active while this frame passed the input adders
  int frame_at_cycle [$];


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
    scen[f] = (f < 14) ? scen_t'(f % 7) : scen_t'($urandom % 7);
    case (scen[f])
      SINGLE, TMR_SINGLE: badm[f] = 4'(1 << ($urandom % 4));
      DOUBLE:  begin badm[f] = 4'(1 << ($urandom % 4)); badm[f] |= {badm[f][2:0], badm[f][3]}; end
      TRIPLE:  badm[f] = ~4'(1 << ($urandom % 4));
      default: badm[f] = 4'b0;
    endcase
  endtask

  task automatic set_fault(input int f);
    inj_en  = '0;
    inj_tmr = '0;
    inj_bin = 3'($urandom);
    inj_val = OW'({$urandom, $urandom}) | OW'(1);
    inj_en[NFFT-1:0] = badm[f];
    if (scen[f] == REDUNDANT) inj_en[NFFT + $urandom % 3] = 1'b1;
    if (scen[f] == TMR || scen[f] == TMR_SINGLE) inj_tmr[$urandom % 3] = 1'b1;
  endtask

  task automatic check_out(input int f);
    logic exp_tmr;
    count[scen[f]]++;
    exp_tmr = (scen[f] == TMR || scen[f] == TMR_SINGLE) || tmr_in[f];
    checks++;
    if (tmr_mismatch !== exp_tmr) begin failures++; $display("frame %0d tmr_mismatch %b", f, tmr_mismatch); end
    checks++;
    if (err_flags !== badm[f] || n_err !== 3'($countones(badm[f])) ||
        uncorrectable !== (scen[f] == TRIPLE)) begin
      failures++;
      $display("frame %0d scen %0d: flags %b n_err %0d unc %b", f, scen[f], err_flags, n_err,
               uncorrectable);
    end
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 8; k++) begin
        if (scen[f] == TRIPLE && badm[f][i]) continue;
        checks++;
        if (longint'(w_re[i][k]) != er[f][i][k] || longint'(w_im[i][k]) != ei[f][i][k]) begin
          failures++;
          if (failures < 10) $display("frame %0d scen %0d fft %0d bin %0d wrong", f, scen[f], i, k);
        end
      end
  endtask

  initial begin
    int f, cyc, pending [$], lat [$];
    for (int i = 0; i < 4; i++) for (int n = 0; n < 8; n++) begin a_re[i][n] = '0; a_im[i][n] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    f = 0;
    cyc = 0;
    // each cycle: observe, then drive the next frame and the fault for the previous one
    while (f < NF || pending.size() > 0 || cyc < 4) begin
      @(negedge clk);
      if (out_valid) begin
        int g;
        checks++;
        if (pending.size() == 0) begin failures++; $display("spurious out_valid"); end
        else begin
          g = pending.pop_front();
          if (cyc - lat.pop_front() != 2) begin failures++; $display("frame %0d latency wrong", g); end
          check_out(g);
        end
      end
      if (in_valid) set_fault(f - 1); else begin inj_en = '0; inj_tmr = '0; end
      if (f < NF && (cyc % 37) != 36) begin
        new_frame(f);
        tmr_in[f] = (inj_tmr != 0);
        in_valid = 1;
        pending.push_back(f);
        lat.push_back(cyc);
        f++;
      end else in_valid = 0;
      cyc++;
    end
    for (int s = 0; s < NSCEN; s++) begin
      checks++;
      if (count[s] == 0) begin failures++; $display("scenario %0d never happened", s); end
    end
    $display("scenarios: clean %0d single %0d redundant %0d tmr %0d tmr+single %0d double %0d triple %0d",
             count[CLEAN], count[SINGLE], count[REDUNDANT], count[TMR], count[TMR_SINGLE],
             count[DOUBLE], count[TRIPLE]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
