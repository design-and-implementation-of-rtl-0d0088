// Reference models for the receiver testbenches.
//
// chan_ref computes one channelizer output directly from its definition:
// the input, zero-packed by L, is heterodyned by the channel frequency
// (4k+s)/(4N) of the input rate, filtered by the prototype h[] and kept once
// every M up-sampled ticks. The sum runs over every prototype tap whose
// zero-packed input is non-zero; products, phasor rotation, accumulation and
// the final truncation use the same fixed-point formats as the hardware, so
// the result must match bit for bit. bpf_ref does the same for the complex
// band-pass filter and re-sampler.
package chan_ref_pkg;

  function automatic int phasor(input int n4, input int idx, input bit sine);
    real ang;
    ang = 2.0 * 3.14159265358979323846 * real'(idx) / real'(n4);
    return $rtoi($floor((sine ? $sin(ang) : $cos(ang)) * 16384.0 + 0.5));
  endfunction

  function automatic longint sat(input longint v, input int w);
    longint hi, lo;
    hi = (longint'(1) <<< (w - 1)) - 1;
    lo = -(longint'(1) <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // Output m of a channelizer with N paths, T taps per path, resampling L/M.
  function automatic void chan_ref(
      input int N, input int T, input int L, input int M, input int R_INIT,
      ref int h[], ref int xr[], ref int xi[],
      input int m, input int k4, output longint yr, output longint yi);
    longint tick, acc_r, acc_i;
    int n4, s;
    n4 = 4 * N;
    s  = k4 % 4;
    // output instant in up-sampled ticks; input j sits at tick L*j
    tick  = longint'(R_INIT) + longint'(M) * (m + 1) - L;
    acc_r = 0;
    acc_i = 0;
    for (int n = 0; n < N * L * T; n++) begin
      longint d, j;
      longint pr, pi, rr, ri, c, sn;
      int q, t, idx;
      d = tick - n;
      if (d < 0 || (d % L) != 0) continue;
      j = d / L;
      if (j >= xr.size()) continue;
      // heterodyne exp(-j*2*pi*k4*j/n4), built from the same quantised table
      // as a product of the per-path phasor and a quarter-turn per tap
      q   = int'((tick / L - j) % N);
      t   = int'((tick / L - j) / N);
      pr  = longint'(h[n]) * xr[j];
      pi  = longint'(h[n]) * xi[j];
      case ((s * t) % 4)
        0: begin rr =  pr; ri =  pi; end
        1: begin rr = -pi; ri =  pr; end
        2: begin rr = -pr; ri = -pi; end
        default: begin rr =  pi; ri = -pr; end
      endcase
      idx   = int'(((longint'(k4) * (q - tick / L)) % n4 + n4) % n4);
      c     = phasor(n4, idx, 1'b0);
      sn    = phasor(n4, idx, 1'b1);
      acc_r = acc_r + rr * c - ri * sn;
      acc_i = acc_i + rr * sn + ri * c;
    end
    yr = sat(acc_r >>> 14, 30);
    yi = sat(acc_i >>> 14, 30);
  endfunction

  // Output m of the complex band-pass filter and re-sampler (after input
  // m*D + D-1).
  function automatic void bpf_ref(
      input int TAPS, input int D, ref int cr[], ref int ci[], ref int x[],
      input int m, output int yr, output int yi);
    longint ar, ai;
    int j0;
    j0 = m * D + D - 1;
    ar = 0;
    ai = 0;
    for (int n = 0; n < TAPS; n++) begin
      if (j0 - n < 0) continue;
      ar = ar + longint'(cr[n]) * x[j0 - n];
      ai = ai + longint'(ci[n]) * x[j0 - n];
    end
    yr = int'(sat(ar >>> 11, 16));
    yi = int'(sat(ai >>> 11, 16));
  endfunction

endpackage
