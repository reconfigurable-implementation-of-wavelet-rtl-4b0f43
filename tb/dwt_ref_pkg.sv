// dwt_ref_pkg: plain integer reference model of the 9/7 integer lifting
// transform, used by the testbenches to work out expected values.
//
// The constants are written here as integer multiples of 2^-16 and applied
// with one multiplication each, independent of the shift-add networks of the
// design. Every intermediate is wrapped to 16 bits as the hardware stores it,
// and every product is floored. Lines use symmetric extension at both ends.
package dwt_ref_pkg;

  localparam longint R_ALPHA = -98304;  // -1.5
  localparam longint R_BETA  =   4096;  //  0.0625
  localparam longint R_GAMMA =  52416;  //  0.7998046875
  localparam longint R_DELTA =  30720;  //  0.46875
  localparam longint R_KAPPA =  74127;  //  1.1310882568...
  localparam longint R_KINV  =  57940;  //  0.8840942383...

  typedef int line_t[];

  function automatic int w16(longint v);
    return int'(shortint'(v));
  endfunction

  function automatic int fmul(longint c, longint v);
    return w16((c * v) >>> 16);
  endfunction

  // Forward: x (length n, even) -> s, d (length n/2 each).
  function automatic void fwd(input line_t x, output line_t s, output line_t d);
    int h;
    h = x.size() / 2;
    s = new[h];
    d = new[h];
    for (int k = 0; k < h; k++) begin s[k] = x[2*k]; d[k] = x[2*k+1]; end
    for (int k = 0; k < h; k++) d[k] = w16(d[k] + fmul(R_ALPHA, s[k] + s[(k+1 < h) ? k+1 : k]));
    for (int k = 0; k < h; k++) s[k] = w16(s[k] + fmul(R_BETA,  d[k] + d[(k > 0) ? k-1 : k]));
    for (int k = 0; k < h; k++) d[k] = w16(d[k] + fmul(R_GAMMA, s[k] + s[(k+1 < h) ? k+1 : k]));
    for (int k = 0; k < h; k++) s[k] = w16(s[k] + fmul(R_DELTA, d[k] + d[(k > 0) ? k-1 : k]));
    for (int k = 0; k < h; k++) begin s[k] = fmul(R_KINV, s[k]); d[k] = fmul(R_KAPPA, d[k]); end
  endfunction

  // Inverse: s, d -> x (even samples at 2k, odd at 2k+1).
  function automatic void inv(input line_t si, input line_t di, output line_t x);
    int h;
    line_t s, d;
    h = si.size();
    s = new[h];
    d = new[h];
    x = new[2*h];
    for (int k = 0; k < h; k++) begin s[k] = fmul(R_KAPPA, si[k]); d[k] = fmul(R_KINV, di[k]); end
    for (int k = 0; k < h; k++) s[k] = w16(s[k] - fmul(R_DELTA, d[k] + d[(k > 0) ? k-1 : k]));
    for (int k = 0; k < h; k++) d[k] = w16(d[k] - fmul(R_GAMMA, s[k] + s[(k+1 < h) ? k+1 : k]));
    for (int k = 0; k < h; k++) s[k] = w16(s[k] - fmul(R_BETA,  d[k] + d[(k > 0) ? k-1 : k]));
    for (int k = 0; k < h; k++) d[k] = w16(d[k] - fmul(R_ALPHA, s[k] + s[(k+1 < h) ? k+1 : k]));
    for (int k = 0; k < h; k++) begin x[2*k] = s[k]; x[2*k+1] = d[k]; end
  endfunction

endpackage
