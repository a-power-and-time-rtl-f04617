// Helpers shared by the testbenches: filter design for the bank and the
// channel filter, fixed-point conversion, and the rounding used as the
// reference for the RTL's outputs.
//
// Bank prototypes are half-band low-pass filters (cut-off at a quarter of
// the rate they run at), windowed-sinc with a Hamming window. A node with
// frequency shift w0 (radians per input sample) and interpolation M gets
// c[n] = h[n] * exp(j*w0*M*(n-D)); only n = 0..D are loaded, the node
// mirrors the rest. The channel filter is a windowed-sinc
// low-pass at 300 kHz for a 4 MHz rate, Blackman window.
package tb_util_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int to_q17(input real v);
    real s;
    s = v * 131072.0;
    if (s > 131071.0) s = 131071.0;
    if (s < -131072.0) s = -131072.0;
    return int'($floor(s + 0.5));
  endfunction

  // Half-band prototype tap n of an L-tap filter.
  function automatic real halfband(input int n, input int l);
    real d, t, w;
    d = real'(n) - real'(l - 1) / 2.0;
    w = 0.54 - 0.46 * $cos(2.0 * PI * real'(n) / real'(l - 1));
    if (d == 0.0) t = 0.5;
    else t = $sin(PI * d / 2.0) / (PI * d);
    return t * w;
  endfunction

  // Channel-filter tap n (order 200), cut-off fc as a fraction of fs.
  function automatic real cf_tap(input int n, input real fc);
    real d, t, w;
    d = real'(n) - 100.0;
    w = 0.42 - 0.5 * $cos(2.0 * PI * real'(n) / 200.0)
             + 0.08 * $cos(4.0 * PI * real'(n) / 200.0);
    if (d == 0.0) t = 2.0 * fc;
    else t = $sin(2.0 * PI * fc * d) / (PI * d);
    return t * w;
  endfunction

  // Rounding of a Q.17 sum to a saturated 16-bit value.
  function automatic int rnd_sat(input longint acc);
    longint r;
    r = (acc + 65536) >>> 17;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  function automatic int sat16(input int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // Bank node f: 0 = F10, 1 = F20, 2 = F21, 3..6 = F30..F33.
  function automatic int node_taps(input int f);
    return (f == 0) ? 35 : (f < 3) ? 19 : 15;
  endfunction

  function automatic int node_m(input int f);
    return (f == 0) ? 4 : (f < 3) ? 2 : 1;
  endfunction

  // Frequency shift of node f in units of pi/4 rad per input sample.
  function automatic int node_shift(input int f);
    case (f)
      2: return 1;    // F21: +500 kHz
      4: return 2;    // F31: +1 MHz
      5: return 1;    // F32: +500 kHz
      6: return -1;   // F33: -500 kHz
      default: return 0;
    endcase
  endfunction

  function automatic void node_coef(input int f, input int n, output int re, output int im);
    int  l, m, d;
    real h, ph;
    l  = node_taps(f);
    m  = node_m(f);
    d  = (l - 1) / 2;
    h  = halfband(n, l);
    ph = real'(node_shift(f)) * PI / 4.0 * real'(m) * real'(n - d);
    re = to_q17(h * $cos(ph));
    im = to_q17(h * $sin(ph));
  endfunction

endpackage
