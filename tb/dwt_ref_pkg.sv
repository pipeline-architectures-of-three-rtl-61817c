// dwt_ref_pkg: software reference for the Daubechies transform testbenches.
//
// The filter coefficients are computed here from their closed forms with
// real arithmetic and rounded to 14 fraction bits, independently of the
// constants in the RTL. The reference transforms use plain modular indexing
// (periodic extension) and the same rounding rule as the hardware:
// each inner product is computed at full precision and rounded half up.
package dwt_ref_pkg;

  localparam int FRAC = 14;
  localparam int DW   = 18;

  function automatic longint q14(input real x);
    return longint'($floor(x * real'(1 << FRAC) + 0.5));
  endfunction

  function automatic longint ref_h(input int taps, input int j);
    real r3, r, z1, z2, q;
    real h [6];
    r3 = $sqrt(3.0);
    r  = 4.0 * $sqrt(2.0);
    z1 = $sqrt(10.0);
    z2 = $sqrt(5.0 + 2.0 * z1);
    q  = 16.0 * $sqrt(2.0);
    if (taps == 4) begin
      h[0] = (1.0 + r3) / r;  h[1] = (3.0 + r3) / r;
      h[2] = (3.0 - r3) / r;  h[3] = (1.0 - r3) / r;
      h[4] = 0.0;             h[5] = 0.0;
    end else begin
      h[0] = (1.0 + z1 + z2) / q;
      h[1] = (5.0 + z1 + 3.0 * z2) / q;
      h[2] = (10.0 - 2.0 * z1 + 2.0 * z2) / q;
      h[3] = (10.0 - 2.0 * z1 - 2.0 * z2) / q;
      h[4] = (5.0 + z1 - 3.0 * z2) / q;
      h[5] = (1.0 + z1 - z2) / q;
    end
    return q14(h[j]);
  endfunction

  function automatic longint ref_g(input int taps, input int j);
    longint h;
    h = ref_h(taps, taps - 1 - j);
    return (j % 2 == 0) ? h : -h;
  endfunction

  // Round a full-precision inner product and wrap it to DW bits.
  function automatic longint ref_round(input longint acc);
    longint r;
    r = (acc + (longint'(1) << (FRAC - 1))) >>> FRAC;
    r = r & ((longint'(1) << DW) - 1);
    if (r >= (longint'(1) << (DW - 1))) r -= (longint'(1) << DW);
    return r;
  endfunction

  // One stage on x[0..len-1]: s[m] -> x[m], d[m] -> x[len/2+m].
  function automatic void ref_stage(input int taps, input int len,
                                    ref longint x[]);
    longint t[];
    t = new[len];
    for (int m = 0; m < len / 2; m++) begin
      longint sh, sg;
      sh = 0; sg = 0;
      for (int j = 0; j < taps; j++) begin
        sh += ref_h(taps, j) * x[(2*m + j) % len];
        sg += ref_g(taps, j) * x[(2*m + j) % len];
      end
      t[m]         = ref_round(sh);
      t[len/2 + m] = ref_round(sg);
    end
    for (int i = 0; i < len; i++) x[i] = t[i];
  endfunction

  // Pyramid of `stages` stages on a row of n values, in place.
  function automatic void ref_1d(input int taps, input int stages, input int n,
                                 ref longint x[]);
    for (int k = 0; k < stages; k++) ref_stage(taps, n >> k, x);
  endfunction

  // 3-D transform of v[(z*n + y)*n + x]; result w[(p*n + q)*n + r] with
  // p, q, r the x-, y- and z-frequency indices.
  function automatic void ref_3d(input int taps, input int stages, input int n,
                                 ref longint v[], ref longint w[]);
    longint a[], line[];
    a = new[n*n*n];
    line = new[n];
    for (int i = 0; i < n*n*n; i++) a[i] = v[i];
    // along x
    for (int z = 0; z < n; z++) for (int y = 0; y < n; y++) begin
      for (int x = 0; x < n; x++) line[x] = a[(z*n + y)*n + x];
      ref_1d(taps, stages, n, line);
      for (int x = 0; x < n; x++) a[(z*n + y)*n + x] = line[x];
    end
    // along y
    for (int z = 0; z < n; z++) for (int x = 0; x < n; x++) begin
      for (int y = 0; y < n; y++) line[y] = a[(z*n + y)*n + x];
      ref_1d(taps, stages, n, line);
      for (int y = 0; y < n; y++) a[(z*n + y)*n + x] = line[y];
    end
    // along z
    for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) begin
      for (int z = 0; z < n; z++) line[z] = a[(z*n + y)*n + x];
      ref_1d(taps, stages, n, line);
      for (int z = 0; z < n; z++) a[(z*n + y)*n + x] = line[z];
    end
    w = new[n*n*n];
    for (int z = 0; z < n; z++) for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) w[(x*n + y)*n + z] = a[(z*n + y)*n + x];
  endfunction

endpackage
