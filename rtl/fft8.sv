// fft8: 8-point radix-2 decimation-in-time FFT, one complete frame per clock.
//
// All eight complex samples of a frame enter in parallel on x_re/x_im and
// the eight frequency bins leave in parallel on y_re/y_im one clock later
// (out_valid follows in_valid with a latency of one cycle). Three butterfly
// stages are built as combinational logic in front of the output register:
// stage 1 forms 2-point DFTs of the pairs (x0,x4),(x2,x6),(x1,x5),(x3,x7);
// stage 2 forms the two 4-point DFTs (twiddle -j, a swap and a negation);
// stage 3 combines them with the twiddles W8^k, k = 0..3.
//
// Fixed point: the only non-trivial twiddles are W8^1 = (1-j)/sqrt(2) and
// W8^3 = (-1-j)/sqrt(2). They are applied as the integer C = round(2^F/sqrt 2)
// and every other term is shifted left by F, so the output is the DFT scaled
// by 2^F with F fractional bits. Nothing is rounded or truncated: the FFT is
// an exact integer linear map. That is what lets the parity schemes around it
// correct a faulty FFT exactly and lets the partial-sum checks use a zero
// threshold. OW = IW + 4 + F bits hold any result without overflow.
//
// The frame size of 8 points follows the design specification; the radix-2
// DIT structure, the fixed-point format and the single output register are
// this implementation's choices.
module fft8
  import ftfft_pkg::*;
#(
  parameter int unsigned IW   = IW_DEFAULT,   // input sample width (re and im)
  parameter int unsigned F    = FRAC_DEFAULT, // twiddle fractional bits
  parameter int unsigned OW   = IW + 4 + F    // output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] x_re [N],
  input  logic signed [IW-1:0] x_im [N],
  output logic                 out_valid,
  output logic signed [OW-1:0] y_re [N],
  output logic signed [OW-1:0] y_im [N]
);

  localparam longint unsigned C = twiddle_c(F);
  localparam logic signed [F+1:0] CS = (F+2)'(C);

  typedef logic signed [OW-1:0] word_t;

  word_t s1_re [N], s1_im [N];   // stage 1 results, natural DIT order
  word_t e_re [4], e_im [4];     // 4-point DFT of even samples
  word_t o_re [4], o_im [4];     // 4-point DFT of odd samples
  word_t t_re [4], t_im [4];     // W8^k * O[k], scaled by 2^F
  word_t z_re [N], z_im [N];

  // bit-reversed input order for the DIT flow graph
  localparam int unsigned BR [N] = '{0, 4, 2, 6, 1, 5, 3, 7};

  always_comb begin
    // stage 1: 2-point butterflies on bit-reversed pairs
    for (int p = 0; p < 4; p++) begin
      s1_re[2*p]   = word_t'(x_re[BR[2*p]]) + word_t'(x_re[BR[2*p+1]]);
      s1_im[2*p]   = word_t'(x_im[BR[2*p]]) + word_t'(x_im[BR[2*p+1]]);
      s1_re[2*p+1] = word_t'(x_re[BR[2*p]]) - word_t'(x_re[BR[2*p+1]]);
      s1_im[2*p+1] = word_t'(x_im[BR[2*p]]) - word_t'(x_im[BR[2*p+1]]);
    end
    // stage 2: two 4-point DFTs; W4^1 = -j maps (a + jb) to (b - ja)
    e_re[0] = s1_re[0] + s1_re[2];  e_im[0] = s1_im[0] + s1_im[2];
    e_re[2] = s1_re[0] - s1_re[2];  e_im[2] = s1_im[0] - s1_im[2];
    e_re[1] = s1_re[1] + s1_im[3];  e_im[1] = s1_im[1] - s1_re[3];
    e_re[3] = s1_re[1] - s1_im[3];  e_im[3] = s1_im[1] + s1_re[3];
    o_re[0] = s1_re[4] + s1_re[6];  o_im[0] = s1_im[4] + s1_im[6];
    o_re[2] = s1_re[4] - s1_re[6];  o_im[2] = s1_im[4] - s1_im[6];
    o_re[1] = s1_re[5] + s1_im[7];  o_im[1] = s1_im[5] - s1_re[7];
    o_re[3] = s1_re[5] - s1_im[7];  o_im[3] = s1_im[5] + s1_re[7];
    // stage 3 twiddles, all results scaled by 2^F
    t_re[0] = o_re[0] <<< F;                 t_im[0] = o_im[0] <<< F;
    t_re[1] = CS * (o_re[1] + o_im[1]);      t_im[1] = CS * (o_im[1] - o_re[1]);
    t_re[2] = o_im[2] <<< F;                 t_im[2] = -(o_re[2] <<< F);
    t_re[3] = CS * (o_im[3] - o_re[3]);      t_im[3] = -(CS * (o_re[3] + o_im[3]));
    for (int k = 0; k < 4; k++) begin
      z_re[k]   = (e_re[k] <<< F) + t_re[k];
      z_im[k]   = (e_im[k] <<< F) + t_im[k];
      z_re[k+4] = (e_re[k] <<< F) - t_re[k];
      z_im[k+4] = (e_im[k] <<< F) - t_im[k];
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      y_re <= z_re;
      y_im <= z_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
