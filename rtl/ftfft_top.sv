// ftfft_top: the two fault-tolerant parallel FFT schemes side by side.
//
// Both subsystems protect four 8-point FFTs that process four independent
// frames at one set of frames per clock, and both correct faulty FFTs
// without triplicating them:
//   t1_*  technique 1 (ftfft_tech1): one parity FFT plus three group
//         partial-sum checks whose syndrome locates and corrects one faulty
//         FFT per frame;
//   t2_*  technique 2 (ftfft_tech2): a partial-sum check on every FFT plus
//         three redundant FFTs, correcting up to two faulty FFTs per frame.
// The two are alternatives for the same job; they share only the clock and
// reset here and each has its own inputs, outputs and fault-injection ports
// (tie the inj_* ports to 0 in normal use). Latency is 2 cycles in both.
// Putting both in one top is this implementation's choice so that either
// can be taken from the same build.
module ftfft_top
  import ftfft_pkg::*;
#(
  parameter int unsigned IW     = IW_DEFAULT,   // input sample width
  parameter int unsigned F      = FRAC_DEFAULT, // twiddle fractional bits
  parameter int unsigned THRESH = 0,            // partial-sum check tolerance
  localparam int unsigned OW    = IW + 4 + F
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // technique 1
  input  logic                 t1_in_valid,
  input  logic signed [IW-1:0] t1_a_re [NFFT][N],
  input  logic signed [IW-1:0] t1_a_im [NFFT][N],
  input  logic [NFFT:0]        t1_inj_en,
  input  logic [2:0]           t1_inj_bin,
  input  logic [OW-1:0]        t1_inj_val,
  input  logic [2:0]           t1_inj_tmr,
  output logic                 t1_out_valid,
  output logic signed [OW-1:0] t1_w_re [NFFT][N],
  output logic signed [OW-1:0] t1_w_im [NFFT][N],
  output logic [NCHK-1:0]      t1_syndrome,
  output logic [NFFT-1:0]      t1_err_loc,
  output logic                 t1_err_detected,
  output logic                 t1_uncorrectable,
  output logic                 t1_tmr_mismatch,
  // technique 2
  input  logic                 t2_in_valid,
  input  logic signed [IW-1:0] t2_a_re [NFFT][N],
  input  logic signed [IW-1:0] t2_a_im [NFFT][N],
  input  logic [NFFT+NCHK-1:0] t2_inj_en,
  input  logic [2:0]           t2_inj_bin,
  input  logic [OW-1:0]        t2_inj_val,
  input  logic [2:0]           t2_inj_tmr,
  output logic                 t2_out_valid,
  output logic signed [OW-1:0] t2_w_re [NFFT][N],
  output logic signed [OW-1:0] t2_w_im [NFFT][N],
  output logic [NFFT-1:0]      t2_err_flags,
  output logic [2:0]           t2_n_err,
  output logic                 t2_uncorrectable,
  output logic                 t2_tmr_mismatch
);

  ftfft_tech1 #(.IW(IW), .F(F), .THRESH(THRESH)) u_tech1 (
    .clk, .rst_n,
    .in_valid(t1_in_valid), .a_re(t1_a_re), .a_im(t1_a_im),
    .inj_en(t1_inj_en), .inj_bin(t1_inj_bin), .inj_val(t1_inj_val),
    .inj_tmr(t1_inj_tmr),
    .out_valid(t1_out_valid), .w_re(t1_w_re), .w_im(t1_w_im),
    .syndrome(t1_syndrome), .err_loc(t1_err_loc),
    .err_detected(t1_err_detected), .uncorrectable(t1_uncorrectable),
    .tmr_mismatch(t1_tmr_mismatch));

  ftfft_tech2 #(.IW(IW), .F(F), .THRESH(THRESH)) u_tech2 (
    .clk, .rst_n,
    .in_valid(t2_in_valid), .a_re(t2_a_re), .a_im(t2_a_im),
    .inj_en(t2_inj_en), .inj_bin(t2_inj_bin), .inj_val(t2_inj_val),
    .inj_tmr(t2_inj_tmr),
    .out_valid(t2_out_valid), .w_re(t2_w_re), .w_im(t2_w_im),
    .err_flags(t2_err_flags), .n_err(t2_n_err),
    .uncorrectable(t2_uncorrectable), .tmr_mismatch(t2_tmr_mismatch));

endmodule
