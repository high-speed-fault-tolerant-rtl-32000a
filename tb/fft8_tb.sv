// fft8_tb: self-checking testbench of the 8-point FFT.
//
// Drives random full-range frames, frames at the extremes of the input range
// and single impulses back to back, one frame per clock, and compares every
// output bin with the direct DFT of ftfft_ref_pkg. It also checks that each
// result appears exactly one clock after its frame (out_valid latency 1).
module fft8_tb;
  import ftfft_pkg::*;
  import ftfft_ref_pkg::*;

  localparam int unsigned IW = IW_DEFAULT;
  localparam int unsigned F  = FRAC_DEFAULT;
  localparam int unsigned OW = IW + 4 + F;
  localparam int NFRAMES = 200;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [IW-1:0] x_re [N], x_im [N];
  logic signed [OW-1:0] y_re [N], y_im [N];
  int checks = 0, failures = 0;

  fft8 #(.IW(IW), .F(F)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint er [NFRAMES][8], ei [NFRAMES][8];
  int sent = 0, got = 0;

  task automatic make_frame(input int idx);
    longint xr [8], xi [8], yr [8], yi [8];
    longint mx, mn;
    mx = (longint'(1) <<< (IW-1)) - 1;
    mn = -(longint'(1) <<< (IW-1));
    for (int n = 0; n < 8; n++) begin
      case (idx % 4)
        0, 1: begin xr[n] = rand_s(IW); xi[n] = rand_s(IW); end
        2: begin xr[n] = ($urandom & 1) ? mx : mn; xi[n] = ($urandom & 1) ? mx : mn; end
        default: begin xr[n] = (n == idx % 8) ? mx : 0; xi[n] = (n == (idx+3) % 8) ? mn : 0; end
      endcase
      x_re[n] = IW'(xr[n]);
      x_im[n] = IW'(xi[n]);
    end
    dft8(xr, xi, F, yr, yi);
    er[idx] = yr;
    ei[idx] = yi;
  endtask

  // every clock: check the frame sent on the previous clock
  int sent_prev = -1;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== (sent_prev >= 0)) begin
        failures++;
        $display("out_valid %0b, expected %0b", out_valid, sent_prev >= 0);
      end
      if (out_valid && sent_prev >= 0) begin
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (longint'(y_re[k]) != er[sent_prev][k] || longint'(y_im[k]) != ei[sent_prev][k]) begin
            failures++;
            if (failures < 10)
              $display("frame %0d bin %0d: got %0d,%0d expected %0d,%0d", sent_prev, k,
                       y_re[k], y_im[k], er[sent_prev][k], ei[sent_prev][k]);
          end
        end
        got++;
      end
    end
  end

  initial begin
    for (int n = 0; n < 8; n++) begin x_re[n] = '0; x_im[n] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      @(negedge clk);
      make_frame(f);
      in_valid = 1;
      @(posedge clk);
      #1 sent_prev = f;
    end
    @(negedge clk);
    in_valid = 0;
    @(posedge clk);
    #1 sent_prev = -1;
    repeat (3) @(posedge clk);
    checks++;
    if (got != NFRAMES) begin failures++; $display("got %0d frames", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
