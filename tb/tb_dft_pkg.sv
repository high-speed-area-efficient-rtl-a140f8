// tb_dft_pkg: reference models for the FFT testbenches.
//
// dft() evaluates the discrete Fourier transform X(k) = sum x(n) W_N^(nk)
// directly in double precision, with no fixed-point rounding, so it is an
// independent reference for the hardware transforms. rot_ref() is the exact
// fixed-point rotation the hardware is specified to perform: the twiddle is
// quantised to FRAC fractional bits (rounded to nearest) and the product is
// rounded half up.
package tb_dft_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic void dft(input int n, input real xr[], input real xi[],
                              output real yr[], output real yi[]);
    yr = new[n];
    yi = new[n];
    for (int k = 0; k < n; k++) begin
      real sr, si;
      sr = 0.0;
      si = 0.0;
      for (int m = 0; m < n; m++) begin
        real ang;
        ang = -2.0 * PI * real'((m * k) % n) / real'(n);
        sr += xr[m] * $cos(ang) - xi[m] * $sin(ang);
        si += xr[m] * $sin(ang) + xi[m] * $cos(ang);
      end
      yr[k] = sr;
      yi[k] = si;
    end
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic longint qround(real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  // Fixed-point twiddle W_n^k: cos and -sin scaled by 2**frac.
  function automatic longint tw_re(int k, int n, int frac);
    return qround($cos(2.0 * PI * real'(k % n) / real'(n)) * real'(longint'(1) << frac));
  endfunction
  function automatic longint tw_im(int k, int n, int frac);
    return qround(-$sin(2.0 * PI * real'(k % n) / real'(n)) * real'(longint'(1) << frac));
  endfunction

  // Floor division by 2**s of a possibly negative value.
  function automatic longint fdiv(longint v, int s);
    return v >>> s;
  endfunction

  // (xr + j xi) * (c + j s), both products at full precision, rounded half up.
  function automatic void rot_ref(input longint xr, input longint xi,
                                  input longint c, input longint s, input int frac,
                                  output longint yr, output longint yi);
    longint h;
    h  = longint'(1) << (frac - 1);
    yr = fdiv(c * xr - s * xi + h, frac);
    yi = fdiv(s * xr + c * xi + h, frac);
  endfunction

endpackage
