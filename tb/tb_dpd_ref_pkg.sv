// tb_dpd_ref_pkg: floating-point reference model of the pre-distorter used
// by the testbenches, and the fifth-order example polynomial that the design
// was characterised with (amplitude coefficients a_1..a_5, phase
// coefficients p_1..p_5 in degrees, output scaling factor 0.8392).
package tb_dpd_ref_pkg;

  localparam real PI = 3.14159265358979;

  localparam real EX_A [5] = '{0.9892, -1.447, 4.622, -6.346, 3.361};
  localparam real EX_P_DEG [5] = '{-27.52, 77.29, -106.9, 74.06, -21.69};
  localparam real EX_SCALE = 0.8392;

  function automatic int to_fix(real v, int frac);
    return int'($floor(v * (2.0 ** frac) + 0.5));
  endfunction

  // sum_{n=1..m} c[n-1] * x^n
  function automatic real poly(real c [], real x);
    real acc = 0.0;
    for (int n = c.size(); n >= 1; n--) acc = acc * x + c[n-1];
    return acc * x;
  endfunction

  // wrap an angle in pi units into [-1, 1)
  function automatic real wrap1(real p);
    return p - 2.0 * $floor((p + 1.0) / 2.0);
  endfunction

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

endpackage
