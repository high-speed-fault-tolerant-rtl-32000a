// ftfft_tech1: four parallel 8-point FFTs protected by parity partial-sum ECC
// (technique 1).
//
// Four data FFTs transform four independent frames a1..a4. One parity FFT
// transforms a1+a2+a3+a4. Three partial-sum checks test the FFT as a linear
// map on the groups {1,2,3}, {1,2,4} and {1,3,4}: each compares the group sum
// of the inputs (A5, A6, A7) with the group sum of the data FFT outputs
// (B5, B6, B7). The three check flags form a Hamming-style syndrome that
// names the faulty FFT, and eic_parity rebuilds that FFT's output as the
// parity FFT output minus the other three. One faulty FFT per frame is
// corrected. The parity FFT itself is not checked: a fault there only matters
// when a correction uses it.
//
// The small blocks around the FFTs are triplicated and voted (TMR): the input
// adders, and the whole detection and correction stage (output adders,
// checks, corrector). tmr_mismatch reports that the three copies disagreed.
//
// Pipeline: all four frames enter together with in_valid; the FFTs and the
// registered input sums make stage 1; the voted, corrected outputs are
// registered in stage 2. out_valid follows in_valid after 2 cycles and a new
// set of frames may enter every cycle.
//
// Fault injection (for testing; tie to 0 in use): inj_en[i] XORs inj_val into
// the real part of bin inj_bin of data FFT i (i = 0..3) or of the parity FFT
// (i = 4); inj_tmr[r] inverts one bit inside copy r of both triplicated
// stages.
//
// The block diagram (four FFTs, adders for A5..A7 and A, partial-sum checks
// P1..P3, parity FFT, error indicator and corrector) and the use of TMR follow
// the design specification; the pipeline, check equations, widths and fault
// injection are this implementation's choices.
module ftfft_tech1
  import ftfft_pkg::*;
#(
  parameter int unsigned IW     = IW_DEFAULT,
  parameter int unsigned F      = FRAC_DEFAULT,
  parameter int unsigned THRESH = 0,
  localparam int unsigned OW    = IW + 4 + F    // data FFT output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] a_re [NFFT][N],
  input  logic signed [IW-1:0] a_im [NFFT][N],
  input  logic [NFFT:0]        inj_en,
  input  logic [2:0]           inj_bin,
  input  logic [OW-1:0]        inj_val,
  input  logic [2:0]           inj_tmr,
  output logic                 out_valid,
  output logic signed [OW-1:0] w_re [NFFT][N],
  output logic signed [OW-1:0] w_im [NFFT][N],
  output logic [NCHK-1:0]      syndrome,
  output logic [NFFT-1:0]      err_loc,
  output logic                 err_detected,
  output logic                 uncorrectable,
  output logic                 tmr_mismatch
);

  localparam int unsigned SW  = IW + 2;      // input group-sum width
  localparam int unsigned POW = SW + 4 + F;  // parity FFT output width
  localparam int unsigned BW  = OW + 2;      // output group-sum width

  // ---------------- stage 0: triplicated input adders -----------------
  localparam int unsigned EVW = (NCHK + 1) * N * 2 * SW;
  logic [EVW-1:0] enc_v;
  logic           enc_mm;

  for (genvar r = 0; r < 3; r++) begin : g_enc
    logic signed [SW-1:0] g_re [NCHK][N], g_im [NCHK][N];
    logic signed [SW-1:0] s_re [N], s_im [N];
    logic [EVW-1:0]       v;
    parity_adder #(.W(IW)) u_add (
      .d_re(a_re), .d_im(a_im), .g_re(g_re), .g_im(g_im),
      .all_re(s_re), .all_im(s_im));
    always_comb begin
      for (int k = 0; k < N; k++) begin
        for (int g = 0; g < NCHK; g++) begin
          v[((g*N + k)*2 + 0)*SW +: SW] = g_re[g][k];
          v[((g*N + k)*2 + 1)*SW +: SW] = g_im[g][k];
        end
        v[((NCHK*N + k)*2 + 0)*SW +: SW] = s_re[k];
        v[((NCHK*N + k)*2 + 1)*SW +: SW] = s_im[k];
      end
      v[0] = v[0] ^ inj_tmr[r];
    end
  end

  tmr_vote #(.W(EVW)) u_enc_vote (
    .a(g_enc[0].v), .b(g_enc[1].v), .c(g_enc[2].v), .y(enc_v), .mismatch(enc_mm));

  logic signed [SW-1:0] ag_re [NCHK][N], ag_im [NCHK][N];  // A5, A6, A7
  logic signed [SW-1:0] as_re [N], as_im [N];              // A = a1+a2+a3+a4
  always_comb begin
    for (int k = 0; k < N; k++) begin
      for (int g = 0; g < NCHK; g++) begin
        ag_re[g][k] = enc_v[((g*N + k)*2 + 0)*SW +: SW];
        ag_im[g][k] = enc_v[((g*N + k)*2 + 1)*SW +: SW];
      end
      as_re[k] = enc_v[((NCHK*N + k)*2 + 0)*SW +: SW];
      as_im[k] = enc_v[((NCHK*N + k)*2 + 1)*SW +: SW];
    end
  end

  // ---------------- stage 1: FFTs and delayed input sums ----------------
  logic signed [OW-1:0]  b_re [NFFT][N], b_im [NFFT][N];
  logic signed [POW-1:0] x_re [N], x_im [N];
  logic [NFFT-1:0]       fft_v;
  logic                  par_v;

  for (genvar i = 0; i < NFFT; i++) begin : g_fft
    fft8 #(.IW(IW), .F(F)) u_fft (
      .clk, .rst_n, .in_valid,
      .x_re(a_re[i]), .x_im(a_im[i]),
      .out_valid(fft_v[i]), .y_re(b_re[i]), .y_im(b_im[i]));
  end

  fft8 #(.IW(SW), .F(F)) u_parity_fft (
    .clk, .rst_n, .in_valid,
    .x_re(as_re), .x_im(as_im),
    .out_valid(par_v), .y_re(x_re), .y_im(x_im));

  logic signed [SW-1:0] ag_q_re [NCHK][N], ag_q_im [NCHK][N];
  always_ff @(posedge clk) begin
    if (in_valid) begin
      ag_q_re <= ag_re;
      ag_q_im <= ag_im;
    end
  end

  logic enc_mm_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) enc_mm_q <= 1'b0;
    else        enc_mm_q <= in_valid & enc_mm;
  end

  // fault injection on the FFT outputs
  logic signed [OW-1:0]  bf_re [NFFT][N];
  logic signed [POW-1:0] xf_re [N];
  always_comb begin
    bf_re = b_re;
    xf_re = x_re;
    for (int i = 0; i < NFFT; i++)
      if (inj_en[i]) bf_re[i][inj_bin] = b_re[i][inj_bin] ^ inj_val;
    if (inj_en[NFFT]) xf_re[inj_bin] = x_re[inj_bin] ^ POW'(inj_val);
  end

  // ---------------- stage 2: triplicated detection and correction -------
  localparam int unsigned CVW = NFFT * N * 2 * OW + NCHK + NFFT + 2;
  logic [CVW-1:0] cor_v;
  logic           cor_mm;

  for (genvar r = 0; r < 3; r++) begin : g_cor
    logic signed [BW-1:0] bg_re [NCHK][N], bg_im [NCHK][N];  // B5, B6, B7
    logic signed [BW-1:0] bs_re [N], bs_im [N];
    logic [NCHK-1:0]      p;
    logic [NCHK-1:0]      p_sum, p_dc;
    logic signed [OW-1:0] cw_re [NFFT][N], cw_im [NFFT][N];
    logic [NFFT-1:0]      loc;
    logic                 det, unc;
    logic [CVW-1:0]       v;

    parity_adder #(.W(OW)) u_add (
      .d_re(bf_re), .d_im(b_im), .g_re(bg_re), .g_im(bg_im),
      .all_re(bs_re), .all_im(bs_im));

    for (genvar g = 0; g < NCHK; g++) begin : g_chk
      partial_sum_check #(.XW(SW), .F(F), .YW(BW), .THRESH(THRESH)) u_chk (
        .x_re(ag_q_re[g]), .x_im(ag_q_im[g]),
        .y_re(bg_re[g]), .y_im(bg_im[g]),
        .err_sum(p_sum[g]), .err_dc(p_dc[g]), .err(p[g]));
    end

    eic_parity #(.W(OW), .PW(POW)) u_eic (
      .b_re(bf_re), .b_im(b_im), .x_re(xf_re), .x_im(x_im), .p(p),
      .w_re(cw_re), .w_im(cw_im), .err_loc(loc), .err_detected(det),
      .uncorrectable(unc));

    always_comb begin
      for (int i = 0; i < NFFT; i++)
        for (int k = 0; k < N; k++) begin
          v[((i*N + k)*2 + 0)*OW +: OW] = cw_re[i][k];
          v[((i*N + k)*2 + 1)*OW +: OW] = cw_im[i][k];
        end
      v[NFFT*N*2*OW +: NCHK]            = p;
      v[NFFT*N*2*OW + NCHK +: NFFT]     = loc;
      v[NFFT*N*2*OW + NCHK + NFFT]      = det;
      v[NFFT*N*2*OW + NCHK + NFFT + 1]  = unc;
      v[0] = v[0] ^ inj_tmr[r];
    end
  end

  tmr_vote #(.W(CVW)) u_cor_vote (
    .a(g_cor[0].v), .b(g_cor[1].v), .c(g_cor[2].v), .y(cor_v), .mismatch(cor_mm));

  always_ff @(posedge clk) begin
    if (fft_v[0]) begin
      for (int i = 0; i < NFFT; i++)
        for (int k = 0; k < N; k++) begin
          w_re[i][k] <= cor_v[((i*N + k)*2 + 0)*OW +: OW];
          w_im[i][k] <= cor_v[((i*N + k)*2 + 1)*OW +: OW];
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      syndrome      <= '0;
      err_loc       <= '0;
      err_detected  <= 1'b0;
      uncorrectable <= 1'b0;
      tmr_mismatch  <= 1'b0;
    end else begin
      out_valid     <= fft_v[0];
      syndrome      <= fft_v[0] ? cor_v[NFFT*N*2*OW +: NCHK] : '0;
      err_loc       <= fft_v[0] ? cor_v[NFFT*N*2*OW + NCHK +: NFFT] : '0;
      err_detected  <= fft_v[0] & cor_v[NFFT*N*2*OW + NCHK + NFFT];
      uncorrectable <= fft_v[0] & cor_v[NFFT*N*2*OW + NCHK + NFFT + 1];
      tmr_mismatch  <= fft_v[0] & (cor_mm | enc_mm_q);
    end
  end

endmodule
