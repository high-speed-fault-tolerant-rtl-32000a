// ftfft_ref_pkg: reference models for the fault-tolerant FFT testbenches.
//
// dft8 computes the 8-point DFT directly, X[k] = sum_n x[n] * T[(n*k) mod 8],
// with the twiddle table T held as integers scaled by 2^F: the even powers
// of W8 are (+-1, +-j) * 2^F and the odd ones are (+-1 +-j) * C with
// C = round(2^F / sqrt(2)), worked out here in floating point. This is the
// exact result the fixed-point radix-2 FFT must produce, computed without any
// butterfly structure. rand_s returns a random signed value of a given width.
package ftfft_ref_pkg;

  function automatic longint rand_s(input int unsigned w);
    longint v;
    v = longint'({$urandom, $urandom});
    v = (v <<< (64 - w)) >>> (64 - w);
    return v;
  endfunction

  function automatic void dft8(input longint xr [8], input longint xi [8],
                               input int unsigned f,
                               output longint yr [8], output longint yi [8]);
    longint c, s, tr [8], ti [8];
    c = longint'($rtoi($floor((2.0 ** f) / $sqrt(2.0) + 0.5)));
    s = longint'(1) <<< f;
    // W8^m = exp(-j*2*pi*m/8)
    tr = '{ s,  c, 0, -c, -s, -c, 0,  c};
    ti = '{ 0, -c, -s, -c, 0,  c,  s,  c};
    for (int k = 0; k < 8; k++) begin
      yr[k] = 0;
      yi[k] = 0;
      for (int n = 0; n < 8; n++) begin
        yr[k] += xr[n] * tr[(n*k) % 8] - xi[n] * ti[(n*k) % 8];
        yi[k] += xr[n] * ti[(n*k) % 8] + xi[n] * tr[(n*k) % 8];
      end
    end
  endfunction

endpackage
