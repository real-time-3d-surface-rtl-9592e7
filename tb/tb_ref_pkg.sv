// tb_ref_pkg: reference models shared by the testbenches.
//
// classify() computes mean and Gaussian curvature of a pixel in floating
// point straight from their defining formulas (exact square root, real
// division) and applies the thresholds. Because the hardware approximates
// the square root, a result whose |H| lies within a relative margin of Th is
// reported as ambiguous and is not checked. make_map() builds a synthetic
// range map, unsigned 10.3, with peaks, pits, ridges, valleys, saddles and
// flat parts.
package tb_ref_pkg;

  function automatic int sgn_of(real x, real t);
    if (x >= t && x != 0.0) return 1;
    if (x <= -t && x != 0.0) return -1;
    return 0;
  endfunction

  function automatic logic [1:0] code(int s);
    return (s > 0) ? 2'b01 : (s < 0) ? 2'b11 : 2'b00;
  endfunction

  // derivatives given in raw units (3 fraction bits)
  function automatic void classify(input int zx_r, zy_r, zxx_r, zyy_r, zxy_r,
                                   input real th, tk,
                                   output logic [1:0] sh, output logic [1:0] sk,
                                   output bit amb);
    real zx, zy, e, g, f, E, F, G, nrm, H, K;
    zx = zx_r / 8.0;  zy = zy_r / 8.0;
    e  = zxx_r / 8.0; g  = zyy_r / 8.0; f = zxy_r / 8.0;
    E  = 1.0 + zx*zx; G = 1.0 + zy*zy; F = zx*zy;
    nrm = zx*zx + zy*zy + 1.0;
    K  = (e*g - f*f) / (nrm * (E*G - F*F));
    H  = (2.0*f*F - e*G - g*E) / (2.0 * (E*G - F*F) * $sqrt(nrm));
    sh = code(sgn_of(H, th));
    sk = code(sgn_of(K, tk));
    amb = 1'b0;
    // the root is approximated: |H| close to Th cannot be judged exactly
    if (th > 0.0 && H != 0.0) begin
      real r;
      r = (H < 0.0 ? -H : H) / th;
      if (r > 0.85 && r < 1.15) amb = 1'b1;
    end
    if (tk > 0.0 && K != 0.0) begin
      real r;
      r = (K < 0.0 ? -K : K) / tk;
      if (r > 0.999999 && r < 1.000001) amb = 1'b1;
    end
  endfunction

  // synthetic scene, raw 10.3 value at (v, u)
  function automatic int map_z(int v, int u, int rows, int cols);
    real x, y, z;
    x = real'(u) / real'(cols);
    y = real'(v) / real'(rows);
    z = 40.0
      + 25.0 * $exp(-((x-0.25)*(x-0.25) + (y-0.3)*(y-0.3)) / 0.02)     // peak
      - 20.0 * $exp(-((x-0.7)*(x-0.7) + (y-0.25)*(y-0.25)) / 0.015)    // pit
      + 30.0 * (x-0.5)*(y-0.75) * ((y > 0.5) ? 1.0 : 0.0)              // saddle
      + 12.0 * $sin(6.2832 * x * 2.0) * ((y > 0.85) ? 1.0 : 0.0);      // ridges and valleys
    if (z < 0.0) z = 0.0;
    if (z > 127.0) z = 127.0;
    return int'(z * 8.0);
  endfunction

endpackage
