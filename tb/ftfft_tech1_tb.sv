// ftfft_tech1_tb: end-to-end testbench of technique 1 (parity FFT).
//
// Streams random sets of four frames, one set per clock with a few idle
// gaps, through the subsystem at its default sizes. Each set gets one
// scenario: no fault; a fault injected into one data FFT (must be located by
// the syndrome and corrected exactly); a fault in the parity FFT only (must
// have no effect); a fault in one TMR copy, alone or with a data-FFT fault
// (must be outvoted and reported); two faulty data FFTs (must be detected;
// the outputs are then not checked, the scheme corrects one FFT only).
// Outputs are compared with the direct DFT of every frame, and each result
// must appear exactly two clocks after its frame. Every scenario must occur.
module ftfft_tech1_tb;
  import ftfft_pkg::*;
  import ftfft_ref_pkg::*;

  localparam int unsigned IW = IW_DEFAULT;
  localparam int unsigned F  = FRAC_DEFAULT;
  localparam int unsigned OW = IW + 4 + F;
  localparam int NF = 300;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [IW-1:0] a_re [NFFT][N], a_im [NFFT][N];
  logic [NFFT:0] inj_en = '0;
  logic [2:0] inj_bin = '0;
  logic [OW-1:0] inj_val = '0;
  logic [2:0] inj_tmr = '0;
  logic signed [OW-1:0] w_re [NFFT][N], w_im [NFFT][N];
  logic [NCHK-1:0] syndrome;
  logic [NFFT-1:0] err_loc;
  logic err_detected, uncorrectable, tmr_mismatch;
  int checks = 0, failures = 0;

  ftfft_tech1 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NF * 3 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {CLEAN, SINGLE, PARITY, TMR, TMR_SINGLE, DOUBLE, NSCEN} scen_t;
  scen_t scen [NF];
  int    bad  [NF];
  longint er [NF][4][8], ei [NF][4][8];
  int count [NSCEN];
  bit tmr_in [NF];   // a TMR fault was active while this frame passed the input adders
  int frame_at_cycle [$];

  // syndrome of each data FFT, written out by hand: FFT1..4 -> 111, 011, 101, 110
  localparam logic [2:0] SYN [4] = '{3'b111, 3'b011, 3'b101, 3'b110};

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
    scen[f] = (f < 12) ? scen_t'(f % 6) : scen_t'($urandom % 6);
    bad[f] = $urandom % 4;
  endtask

  task automatic set_fault(input int f);
    inj_en  = '0;
    inj_tmr = '0;
    inj_bin = 3'($urandom);
    inj_val = OW'({$urandom, $urandom}) | OW'(1);
    case (scen[f])
      SINGLE:     inj_en[bad[f]] = 1'b1;
      PARITY:     inj_en[NFFT] = 1'b1;
      TMR:        inj_tmr[$urandom % 3] = 1'b1;
      TMR_SINGLE: begin inj_en[bad[f]] = 1'b1; inj_tmr[$urandom % 3] = 1'b1; end
      DOUBLE:     begin inj_en[bad[f]] = 1'b1; inj_en[(bad[f] + 1 + $urandom % 3) % 4] = 1'b1; end
      default: ;
    endcase
  endtask

  task automatic check_out(input int f);
    logic exp_tmr;
    logic [2:0] exp_syn;
    logic [3:0] exp_loc;
    count[scen[f]]++;
    exp_tmr = (scen[f] == TMR || scen[f] == TMR_SINGLE) || tmr_in[f];
    checks++;
    if (tmr_mismatch !== exp_tmr) begin failures++; $display("frame %0d tmr_mismatch %b", f, tmr_mismatch); end
    if (scen[f] == DOUBLE) begin
      checks++;
      if (!err_detected) begin failures++; $display("frame %0d double fault not detected", f); end
      return;
    end
    exp_syn = (scen[f] == SINGLE || scen[f] == TMR_SINGLE) ? SYN[bad[f]] : 3'b000;
    exp_loc = (exp_syn != 0) ? 4'(1 << bad[f]) : 4'b0;
    checks++;
    if (syndrome !== exp_syn || err_loc !== exp_loc || err_detected !== (exp_syn != 0) ||
        uncorrectable !== 1'b0) begin
      failures++;
      $display("frame %0d scen %0d: syndrome %b loc %b det %b unc %b", f, scen[f], syndrome,
               err_loc, err_detected, uncorrectable);
    end
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 8; k++) begin
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
    $display("scenarios: clean %0d single %0d parity %0d tmr %0d tmr+single %0d double %0d",
             count[CLEAN], count[SINGLE], count[PARITY], count[TMR], count[TMR_SINGLE], count[DOUBLE]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
