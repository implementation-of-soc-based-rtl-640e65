// tb_fp_pkg: conversions between real (double precision) and binary32 words for the
// testbenches, built on $realtobits/$bitstoreal. to_fp32 truncates the fraction and flushes
// values below the normal range to zero; to_real is exact.
// A testbench utility, not part of the original design.
package tb_fp_pkg;
  function automatic logic [31:0] to_fp32(real r);
    logic [63:0] d;
    int          e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (d[62:52] == 11'd0 || e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  function automatic real to_real(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic real fabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // true when g is within rel * (|e| + floor) of e
  function automatic bit close(real g, real e, real rel, real floor);
    return fabs(g - e) <= rel * (fabs(e) + floor);
  endfunction
endpackage
