// tb_cordic_ref_pkg: reference models for the CORDIC mixer testbenches.
//
// Works in plain integers and reals, without the binary-angle bit tricks of
// the RTL: the residual angle is kept as a full-width signed integer and
// +/-90 and +/-45 degrees are really added and subtracted, and the
// elementary angles come from $atan at run time.
//   ref_dirs     : direction bits of the pre-rotation and of every stage
//   ref_rot_dirs : bit-exact rotation of (x, y) under given directions
//   ideal_rot    : exact rotation by the quantised phase, in reals
package tb_cordic_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic longint elem(int i, int B);
    if (i == 0) return longint'(1) << (B - 3);
    return longint'($floor($atan(2.0 ** (-i)) * (2.0 ** B) / (2.0 * PI) + 0.5));
  endfunction

  // phase read as signed binary angle in [-2^(B-1), 2^(B-1))
  function automatic longint signed_phase(longint phase, int B);
    longint p;
    p = phase & ((longint'(1) << B) - 1);
    if (p >= (longint'(1) << (B - 1))) p = p - (longint'(1) << B);
    return p;
  endfunction

  // directions: dpre = 1 for +90 degrees, d[i] = 1 for a positive rotation
  function automatic void ref_dirs(input longint phase, input int B, input int N,
                                   output bit dpre, output bit [63:0] d,
                                   output longint resid);
    longint z;
    z = signed_phase(phase, B);
    dpre = (z >= 0);
    z = dpre ? z - (longint'(1) << (B - 2)) : z + (longint'(1) << (B - 2));
    d = '0;
    for (int i = 0; i < N; i++) begin
      d[i] = (z >= 0);
      z = d[i] ? z - elem(i, B) : z + elem(i, B);
    end
    resid = z;
  endfunction

  function automatic longint wrap(longint v, int W);
    longint m;
    m = v & ((longint'(1) << W) - 1);
    if (m >= (longint'(1) << (W - 1))) m = m - (longint'(1) << W);
    return m;
  endfunction

  function automatic void ref_rot_dirs(input longint x, input longint y,
                                       input bit dpre, input bit [63:0] d,
                                       input int L, input int NC, input int N,
                                       output longint xo, output longint yo,
                                       input int hr = 2);
    longint xa, ya, xn, yn;
    int frac;
    frac = NC - L - hr;
    if (frac >= 0) begin
      xa = x * (longint'(1) << frac);
      ya = y * (longint'(1) << frac);
    end else begin
      xa = x >>> (-frac);
      ya = y >>> (-frac);
    end
    if (dpre) begin xn = -ya; yn = xa; end
    else      begin xn = ya;  yn = -xa; end
    xa = xn; ya = yn;
    for (int i = 0; i < N; i++) begin
      if (d[i]) begin xn = xa - (ya >>> i); yn = ya + (xa >>> i); end
      else      begin xn = xa + (ya >>> i); yn = ya - (xa >>> i); end
      xa = wrap(xn, NC); ya = wrap(yn, NC);
    end
    xo = xa; yo = ya;
  endfunction

  function automatic real cordic_gain(int N);
    real k;
    k = 1.0;
    for (int i = 0; i < N; i++) k = k * $sqrt(1.0 + 2.0 ** (-2 * i));
    return k;
  endfunction

  // exact rotation by the quantised phase, scaled by gain and datapath scale
  function automatic void ideal_rot(input real x, input real y, input longint phase,
                                    input int B, input int L, input int NC, input int N,
                                    output real xo, output real yo,
                                    input int hr = 2);
    real phi, g;
    phi = 2.0 * PI * real'(signed_phase(phase, B)) / (2.0 ** B);
    g = cordic_gain(N) * (2.0 ** (NC - L - hr));
    xo = g * (x * $cos(phi) - y * $sin(phi));
    yo = g * (x * $sin(phi) + y * $cos(phi));
  endfunction

endpackage
