// hps_ref_pkg: reference model for the testbenches of the HPS log2 unit.
//
// The coefficients are kept here as the decimal values of the published
// tables (reals), and every fixed-point step is written out directly from
// the defining formulas:
//   i = x >> 11, x_w = x mod 2^11, q = floor(x_w^2 / 2^13)
//   s2 = l2,i + j2,i * x_w * 2^-11 - c2,i * q * 2^-9, each product truncated
//        down to a multiple of 2^-17
//   y  = floor(x * s2 * 2^-14 * 2^17) * 2^-17
// so the expected values do not share code with the RTL.
package hps_ref_pkg;

  localparam real L_DEC [8] = '{1.44268798828125000, 1.35939788818359375,
                                1.28771209716796875, 1.22514343261718750,
                                1.16991424560546875, 1.12069702148437500,
                                1.07646942138671875, 1.03644561767578125};
  localparam real J_DEC [8] = '{-0.089294433593750, -0.076629638671875,
                                -0.066589355468750, -0.058471679687500,
                                -0.051849365234375, -0.046447753906250,
                                -0.041900634765625, -0.038085937500000};
  localparam real C_DEC [8] = '{-0.0060424804687500, -0.0049438476562500,
                                -0.0040435791015625, -0.0032501220703125,
                                -0.0026397705078125, -0.0022277832031250,
                                -0.0018920898437500, -0.0016479492187500};

  // exact integer image of a real that lies on the 2^-frac grid
  function automatic longint unsigned to_grid(real v, int frac);
    return longint'($rtoi(v * (2.0 ** frac) + 0.5));
  endfunction

  function automatic int unsigned ref_sq(int unsigned xw);
    return (xw * xw) >> 13;
  endfunction

  // s2 on the 2^-17 grid, integer part included (131072 = 1.0)
  function automatic longint ref_s2(int unsigned x);
    int unsigned i, xw, q;
    longint l, jp, cp;
    i  = x >> 11;
    xw = x & 2047;
    q  = ref_sq(xw);
    l  = longint'(to_grid(L_DEC[i], 17));
    // |j| * x_w * 2^-11 on the 2^-17 grid, truncated
    jp = longint'(to_grid(-J_DEC[i], 15)) * longint'(xw) / 512;
    // |c| * q * 2^-9 on the 2^-17 grid, truncated
    cp = longint'(to_grid(-C_DEC[i], 16)) * longint'(q) / 256;
    return l - jp + cp;
  endfunction

  function automatic int unsigned ref_y(int unsigned x);
    return int'((longint'(x) * ref_s2(x)) >>> 14);
  endfunction

  function automatic real log2_1px(int unsigned x);
    return $ln(1.0 + real'(x) / 16384.0) / $ln(2.0);
  endfunction

endpackage
