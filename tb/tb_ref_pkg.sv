// Reference model shared by the testbenches: the arithmetic of the four
// neighbourhood operations, written directly from the mask definitions and
// independent of the RTL datapaths.
//   LPF : (sum of 1 1 1 / 1 2 1 / 1 1 1 weighted pixels) / 8, truncated
//   HPF : 8*centre - sum of the eight neighbours
//   HBF : (8C+1)*centre - C * sum of the eight neighbours
// `raw_value` gives the unclipped result; `clip8` maps it to 0..255.
// Window pixels p[0..8] are in row-major order, p[4] is the centre.
package tb_ref_pkg;

  function automatic int raw_value(int op, int c, int p[9]);
    int s = 0;
    for (int k = 0; k < 9; k++) if (k != 4) s += p[k];
    case (op)
      0:       return (s + 2 * p[4]) / 8;
      1:       return 8 * p[4] - s;
      2:       return (8 * c + 1) * p[4] - c * s;
      default: return p[4];
    endcase
  endfunction

  function automatic int clip8(int v);
    if (v < 0)   return 0;
    if (v > 255) return 255;
    return v;
  endfunction

endpackage
