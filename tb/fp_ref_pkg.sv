// fp_ref_pkg: reference helpers for the floating-point testbenches. Converts
// IEEE-754 binary32 bit patterns to and from real numbers by their definition
// (value = (-1)^s * 1.f * 2^(e-127), denormals read as zero), and compares a
// unit's result with a real-valued reference within a relative tolerance.
// r2f converts a positive real back to binary32, truncating.
package fp_ref_pkg;
  function automatic real f2r(logic [31:0] v);
    real m;
    if (v[30:23] == 0) return 0.0;
    m = 1.0 + real'(v[22:0]) / 8388608.0;
    for (int i = 0; i < int'(v[30:23]) - 127; i++) m = m * 2.0;
    for (int i = 0; i < 127 - int'(v[30:23]); i++) m = m / 2.0;
    return v[31] ? -m : m;
  endfunction

  // true when got is within rel_tol of the exact value ref (|ref| below the
  // smallest normal number may flush to zero)
  function automatic logic near(logic [31:0] got, real ref_v, real rel_tol);
    real g, d, ar;
    g  = f2r(got);
    ar = (ref_v < 0.0) ? -ref_v : ref_v;
    if (ar < 1.2e-38) return (g < 1.2e-38 && g > -1.2e-38);
    d = g - ref_v;
    if (d < 0.0) d = -d;
    return d <= ar * rel_tol;
  endfunction
  // nearest binary32 pattern below |x| (truncated), for positive normal x
  function automatic logic [31:0] r2f(real x);
    int e = 127;
    real m = x;
    if (x <= 0.0) return 32'd0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    return {1'b0, 8'(e), 23'($rtoi((m - 1.0) * 8388608.0))};
  endfunction

  localparam real ULP_REL = 2.384185791015625e-07;  // 2^-22
endpackage
