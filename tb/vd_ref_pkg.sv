// vd_ref_pkg: reference model of the virtual digitising inner loop, used by
// the end-to-end testbenches. It is written from the equations, not from the
// RTL structure: each Multi-Rotator step forms the four products of the
// angle addition rules with wide integers and rounds them down to the
// coordinate unit (floor of division by 2^(n-1)), the stored products are
// limited to n bits, and the torus distance uses rounded-down integer square
// roots. The rotation plane (a, b) is the (y, z) plane of the lathe.
package vd_ref_pkg;

  localparam int unsigned N = 32;
  localparam real PI = 3.14159265358979323846;

  typedef struct {
    longint xc, xs, yc, ys;   // a*C, a*S, b*C, b*S of the previous angle
  } mr_state_t;

  typedef struct {
    longint tx, ty, big_r, small_r;
  } tool_t;

  function automatic longint coef(input real value);
    return longint'(value * (2.0 ** (N - 1)));
  endfunction

  function automatic longint sat_n(input logic signed [127:0] v);
    longint lim = (64'sd1 <<< (N - 1));
    if (v > 128'(lim - 1)) return lim - 1;
    if (v < -128'(lim))    return -lim;
    return longint'(v);
  endfunction

  function automatic mr_state_t mr_init(input longint a, input longint b);
    mr_state_t s;
    s.xc = a; s.xs = 0; s.yc = b; s.ys = 0;
    return s;
  endfunction

  // One rotation step: updates the state and returns the rotated (a, b).
  function automatic void mr_step(inout mr_state_t s, input longint ci, input longint si,
                                  output longint a_out, output longint b_out);
    logic signed [127:0] pxc, pxs, pyc, pys;
    pxc = ((128'(s.xc) * 128'(ci)) - (128'(s.xs) * 128'(si))) >>> (N - 1);
    pys = ((128'(s.ys) * 128'(ci)) + (128'(s.yc) * 128'(si))) >>> (N - 1);
    pyc = ((128'(s.yc) * 128'(ci)) - (128'(s.ys) * 128'(si))) >>> (N - 1);
    pxs = ((128'(s.xs) * 128'(ci)) + (128'(s.xc) * 128'(si))) >>> (N - 1);
    a_out = longint'(pxc - pys);
    b_out = longint'(pyc + pxs);
    s.xc = sat_n(pxc); s.xs = sat_n(pxs); s.yc = sat_n(pyc); s.ys = sat_n(pys);
  endfunction

  // floor(sqrt(v)) for 0 <= v < 2^126: real estimate, then exact correction
  function automatic longint isqrt(input logic signed [127:0] v);
    logic signed [127:0] r;
    r = 128'(longint'($sqrt(real'(v))));
    while (r > 0 && r * r > v) r = r - 1;
    while ((r + 1) * (r + 1) <= v) r = r + 1;
    return longint'(r);
  endfunction

  // Distance along Y from the torus tool; miss = 1 when it cannot touch.
  function automatic longint torus_dist(input tool_t t, input longint x, input longint y,
                                        input longint z, output bit miss);
    logic signed [127:0] dx, t1, s, t2;
    dx = 128'(x) - 128'(t.tx);
    t1 = 128'(t.small_r) * 128'(t.small_r) - dx * dx;
    miss = 1'b1;
    if (t1 < 0) return 0;
    s  = 128'(t.big_r) + 128'(isqrt(t1));
    t2 = s * s - 128'(z) * 128'(z);
    if (t2 < 0) return 0;
    miss = 1'b0;
    return t.ty - y - isqrt(t2);
  endfunction

  // Surface point (u, v) of a test object: a body of revolution about X
  // with a wavy radius, coordinates in micrometres, 2 mm grid along X.
  function automatic void surface_point(input int u, input int v, input int nv,
                                        output longint x, output longint y, output longint z);
    real phi, rho;
    phi = 2.0 * PI * real'(v) / real'(nv);
    rho = 5000.0 + 1000.0 * $sin(0.3 * real'(u)) + 500.0 * $cos(3.0 * phi);
    x = longint'(u) * 2000;
    y = longint'(rho * $cos(phi));
    z = longint'(rho * $sin(phi));
  endfunction

endpackage
