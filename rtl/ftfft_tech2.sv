// ftfft_tech2: four parallel 8-point FFTs protected by per-FFT partial-sum
// checks and three redundant FFTs (technique 2).
//
// Each data FFT i transforms its own frame a_i and has its own partial-sum
// check comparing a_i with the FFT's output. The check flags therefore say
// directly which FFTs are faulty. Three redundant FFTs transform the group
// sums A5 = a1+a2+a3, A6 = a1+a2+a4 and A7 = a1+a3+a4, and their outputs
// F4..F6 act as the check symbols of a (7,4) code over the FFT outputs.
// eic_erasure treats the flagged FFTs as erasures and rebuilds up to two of
// them per frame from these equations. The redundant FFTs are not checked:
// a fault in one only matters when a correction uses it.
//
// The input adders and the detection and correction stage (the four checks
// and the corrector) are triplicated and voted (TMR); tmr_mismatch reports a
// disagreement between copies.
//
// Pipeline: the four frames enter together with in_valid; the FFTs and the
// registered input frames make stage 1; the voted, corrected outputs are
// registered in stage 2. out_valid follows in_valid after 2 cycles and a new
// set of frames may enter every cycle.
//
// Fault injection (for testing; tie to 0 in use): inj_en[i] XORs inj_val into
// the real part of bin inj_bin of data FFT i (i = 0..3) or of redundant FFT
// i-4 (i = 4..6); inj_tmr[r] inverts one bit inside copy r of both
// triplicated stages.
//
// The block diagram (per-FFT partial sums, adders for A5..A7, three redundant
// FFTs, error indicator and corrector), the correction of two faulty FFTs and
// the use of TMR follow the design specification; the pipeline, the check
// equations, widths and fault injection are this implementation's choices.
module ftfft_tech2
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
  input  logic [NFFT+NCHK-1:0] inj_en,
  input  logic [2:0]           inj_bin,
  input  logic [OW-1:0]        inj_val,
  input  logic [2:0]           inj_tmr,
  output logic                 out_valid,
  output logic signed [OW-1:0] w_re [NFFT][N],
  output logic signed [OW-1:0] w_im [NFFT][N],
  output logic [NFFT-1:0]      err_flags,
  output logic [2:0]           n_err,
  output logic                 uncorrectable,
  output logic                 tmr_mismatch
);

  localparam int unsigned SW = IW + 2;       // input group-sum width
  localparam int unsigned RW = SW + 4 + F;   // redundant FFT output width

  // ---------------- stage 0: triplicated input adders -----------------
  localparam int unsigned EVW = NCHK * N * 2 * SW;
  logic [EVW-1:0] enc_v;
  logic           enc_mm;

  for (genvar r = 0; r < 3; r++) begin : g_enc
    logic signed [SW-1:0] g_re [NCHK][N], g_im [NCHK][N];
    logic signed [SW-1:0] s_re [N], s_im [N];   // four-way sum, not used here
    logic [EVW-1:0]       v;
    parity_adder #(.W(IW)) u_add (
      .d_re(a_re), .d_im(a_im), .g_re(g_re), .g_im(g_im),
      .all_re(s_re), .all_im(s_im));
    always_comb begin
      for (int k = 0; k < N; k++)
        for (int g = 0; g < NCHK; g++) begin
          v[((g*N + k)*2 + 0)*SW +: SW] = g_re[g][k];
          v[((g*N + k)*2 + 1)*SW +: SW] = g_im[g][k];
        end
      v[0] = v[0] ^ inj_tmr[r];
    end
  end

  tmr_vote #(.W(EVW)) u_enc_vote (
    .a(g_enc[0].v), .b(g_enc[1].v), .c(g_enc[2].v), .y(enc_v), .mismatch(enc_mm));

  logic signed [SW-1:0] ag_re [NCHK][N], ag_im [NCHK][N];  // A5, A6, A7
  always_comb begin
    for (int k = 0; k < N; k++)
      for (int g = 0; g < NCHK; g++) begin
        ag_re[g][k] = enc_v[((g*N + k)*2 + 0)*SW +: SW];
        ag_im[g][k] = enc_v[((g*N + k)*2 + 1)*SW +: SW];
      end
  end

  // ---------------- stage 1: data and redundant FFTs --------------------
  logic signed [OW-1:0] b_re [NFFT][N], b_im [NFFT][N];
  logic signed [RW-1:0] f_re [NCHK][N], f_im [NCHK][N];
  logic [NFFT-1:0]      fft_v;
  logic [NCHK-1:0]      red_v;

  for (genvar i = 0; i < NFFT; i++) begin : g_fft
    fft8 #(.IW(IW), .F(F)) u_fft (
      .clk, .rst_n, .in_valid,
      .x_re(a_re[i]), .x_im(a_im[i]),
      .out_valid(fft_v[i]), .y_re(b_re[i]), .y_im(b_im[i]));
  end

  for (genvar g = 0; g < NCHK; g++) begin : g_red
    fft8 #(.IW(SW), .F(F)) u_fft (
      .clk, .rst_n, .in_valid,
      .x_re(ag_re[g]), .x_im(ag_im[g]),
      .out_valid(red_v[g]), .y_re(f_re[g]), .y_im(f_im[g]));
  end

  // input frames delayed to line up with the FFT outputs for the checks
  logic signed [IW-1:0] a_q_re [NFFT][N], a_q_im [NFFT][N];
  always_ff @(posedge clk) begin
    if (in_valid) begin
      a_q_re <= a_re;
      a_q_im <= a_im;
    end
  end

  logic enc_mm_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) enc_mm_q <= 1'b0;
    else        enc_mm_q <= in_valid & enc_mm;
  end

  // fault injection on the FFT outputs
  logic signed [OW-1:0] bf_re [NFFT][N];
  logic signed [RW-1:0] ff_re [NCHK][N];
  always_comb begin
    bf_re = b_re;
    ff_re = f_re;
    for (int i = 0; i < NFFT; i++)
      if (inj_en[i]) bf_re[i][inj_bin] = b_re[i][inj_bin] ^ inj_val;
    for (int g = 0; g < NCHK; g++)
      if (inj_en[NFFT+g]) ff_re[g][inj_bin] = f_re[g][inj_bin] ^ RW'(inj_val);
  end

  // ---------------- stage 2: triplicated detection and correction -------
  localparam int unsigned CVW = NFFT * N * 2 * OW + NFFT + 3 + 1;
  logic [CVW-1:0] cor_v;
  logic           cor_mm;

  for (genvar r = 0; r < 3; r++) begin : g_cor
    logic [NFFT-1:0]      e, e_sum, e_dc;
    logic signed [OW-1:0] cw_re [NFFT][N], cw_im [NFFT][N];
    logic [2:0]           ne;
    logic                 unc;
    logic [CVW-1:0]       v;

    for (genvar i = 0; i < NFFT; i++) begin : g_chk
      partial_sum_check #(.XW(IW), .F(F), .YW(OW), .THRESH(THRESH)) u_chk (
        .x_re(a_q_re[i]), .x_im(a_q_im[i]),
        .y_re(bf_re[i]), .y_im(b_im[i]),
        .err_sum(e_sum[i]), .err_dc(e_dc[i]), .err(e[i]));
    end

    eic_erasure #(.W(OW), .RW(RW)) u_eic (
      .b_re(bf_re), .b_im(b_im), .f_re(ff_re), .f_im(f_im), .e(e),
      .w_re(cw_re), .w_im(cw_im), .n_err(ne), .uncorrectable(unc));

    always_comb begin
      for (int i = 0; i < NFFT; i++)
        for (int k = 0; k < N; k++) begin
          v[((i*N + k)*2 + 0)*OW +: OW] = cw_re[i][k];
          v[((i*N + k)*2 + 1)*OW +: OW] = cw_im[i][k];
        end
      v[NFFT*N*2*OW +: NFFT]       = e;
      v[NFFT*N*2*OW + NFFT +: 3]   = ne;
      v[NFFT*N*2*OW + NFFT + 3]    = unc;
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
      err_flags     <= '0;
      n_err         <= '0;
      uncorrectable <= 1'b0;
      tmr_mismatch  <= 1'b0;
    end else begin
      out_valid     <= fft_v[0];
      err_flags     <= fft_v[0] ? cor_v[NFFT*N*2*OW +: NFFT] : '0;
      n_err         <= fft_v[0] ? cor_v[NFFT*N*2*OW + NFFT +: 3] : '0;
      uncorrectable <= fft_v[0] & cor_v[NFFT*N*2*OW + NFFT + 3];
      tmr_mismatch  <= fft_v[0] & (cor_mm | enc_mm_q);
    end
  end

endmodule
