// partial_sum_check_tb: self-checking testbench of the partial-sum check.
//
// For random frames x it computes the exact fixed-point DFT Y with the
// reference model and then presents (x, Y) unchanged, with one bin changed,
// with bin 0 changed, with the imaginary part of one bin changed, and with
// two equal and opposite changes outside bin 0 (a pattern the check cannot
// see by construction). err, err_sum and err_dc are compared with the
// expected result of each case. A second instance with THRESH = 4 must pass
// differences up to 4 and flag 5.
module partial_sum_check_tb;
  import ftfft_pkg::*;
  import ftfft_ref_pkg::*;

  localparam int unsigned XW = IW_DEFAULT;
  localparam int unsigned F  = FRAC_DEFAULT;
  localparam int unsigned YW = XW + 4 + F;

  logic signed [XW-1:0] x_re [N], x_im [N];
  logic signed [YW-1:0] y_re [N], y_im [N];
  logic err_sum, err_dc, err;
  logic t_sum, t_dc, t_err;
  int checks = 0, failures = 0;

  partial_sum_check #(.XW(XW), .F(F), .YW(YW), .THRESH(0)) dut (.*);
  partial_sum_check #(.XW(XW), .F(F), .YW(YW), .THRESH(4)) dut_t (
    .x_re, .x_im, .y_re, .y_im, .err_sum(t_sum), .err_dc(t_dc), .err(t_err));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect3(input logic s, input logic d, input string what);
    #1;
    checks++;
    if (err_sum !== s || err_dc !== d || err !== (s | d)) begin
      failures++;
      if (failures < 10)
        $display("%s: err_sum %0b err_dc %0b err %0b, expected %0b %0b", what, err_sum, err_dc, err, s, d);
    end
  endtask

  initial begin
    longint xr [8], xi [8], yr [8], yi [8], e;
    int b, b2;
    for (int t = 0; t < 200; t++) begin
      for (int n = 0; n < 8; n++) begin
        xr[n] = rand_s(XW);
        xi[n] = rand_s(XW);
        x_re[n] = XW'(xr[n]);
        x_im[n] = XW'(xi[n]);
      end
      dft8(xr, xi, F, yr, yi);
      for (int k = 0; k < 8; k++) begin y_re[k] = YW'(yr[k]); y_im[k] = YW'(yi[k]); end
      expect3(0, 0, "clean");
      e = (rand_s(20) | 1);
      b = 1 + ($urandom % 7);
      y_re[b] = YW'(yr[b] + e);
      expect3(1, 0, "one bin re");
      y_re[b] = YW'(yr[b]);
      y_im[b] = YW'(yi[b] - e);
      expect3(1, 0, "one bin im");
      y_im[b] = YW'(yi[b]);
      y_re[0] = YW'(yr[0] ^ (longint'(1) <<< ($urandom % (YW-1))));
      expect3(1, 1, "bin 0");
      y_re[0] = YW'(yr[0]);
      b2 = (b % 7) + 1;
      y_re[b]  = YW'(yr[b] + e);
      y_re[b2] = YW'(yr[b2] - e);
      expect3(0, 0, "cancelling pair");
      y_re[b]  = YW'(yr[b]);
      y_re[b2] = YW'(yr[b2]);
      // threshold
      y_im[b] = YW'(yi[b] + 4);
      #1; checks++;
      if (t_err !== 1'b0 || err !== 1'b1) begin failures++; $display("threshold 4 case"); end
      y_im[b] = YW'(yi[b] - 5);
      #1; checks++;
      if (t_err !== 1'b1 || t_sum !== 1'b1 || t_dc !== 1'b0) begin failures++; $display("threshold 5 case"); end
      y_im[b] = YW'(yi[b]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
