// lsq_ref_pkg: reference models for the testbenches of the logarithmic
// square / square-root unit.
//
// The models restate the published segment coefficients on their own (they do
// not import the RTL package) and evaluate each segment with an ordinary
// multiplication, f*(256+C)/256 + B/2^14, on integers wide enough to be exact,
// truncating to FW fraction bits at the end. This matches the RTL bit for bit
// when the RTL's shift-and-add datapath is right. Real-valued helpers give the
// exact functions for accuracy checks.
package lsq_ref_pkg;

  localparam int REF_LOG_C  [8] = '{92, 55, 24, 0, -20, -36, -52, -64};
  localparam int REF_LOG_B  [8] = '{0, 296, 792, 1380, 2032, 2668, 3432, 4096};
  localparam int REF_ALOG_C [8] = '{-71, -54, -36, -16, 6, 30, 56, 84};
  localparam int REF_ALOG_B [8] = '{16386, 16252, 15966, 15489, 14786, 13826, 12578, 11008};

  // Segment line value, truncated to fw fraction bits (may have integer bits).
  function automatic longint seg_line(longint f, int fw, int c, int b);
    int     gw;
    longint v;
    gw = ((fw > 14) ? fw : 14) + 8;
    // f * 2^(gw-fw) * (256+c) / 256 is exact because gw-fw >= 8
    v = ((f <<< (gw - fw)) * (256 + longint'(c))) / 256 + (longint'(b) <<< (gw - 14));
    return v >>> (gw - fw);
  endfunction

  function automatic int seg_of(longint f, int fw);
    return int'(f >> (fw - 3));
  endfunction

  // ~log2(1+f) with fw fraction bits
  function automatic longint log_frac_ref(longint f, int fw);
    int s;
    s = seg_of(f, fw);
    return seg_line(f, fw, REF_LOG_C[s], REF_LOG_B[s]);
  endfunction

  // ~2^f as 1.fw
  function automatic longint alog_frac_ref(longint f, int fw);
    int s;
    s = seg_of(f, fw);
    return seg_line(f, fw, REF_ALOG_C[s], REF_ALOG_B[s]);
  endfunction

  function automatic real log2r(real x);
    return $ln(x) / $ln(2.0);
  endfunction

  function automatic real pow2r(real x);
    return $exp(x * $ln(2.0));
  endfunction

endpackage
