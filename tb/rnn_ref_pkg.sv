// rnn_ref_pkg: bit-exact reference model of the fixed-point RNN, for the testbenches.
//
// Written independently of the RTL: plain integer arithmetic on longint values, where a
// truncation is a floor division by a power of two and saturation clamps to the signed
// 18-bit range. Fraction widths: samples/energies 10, u and h 12, weights 14.
package rnn_ref_pkg;

  localparam int RN = 8;   // units assumed by the reference arrays (upper bound)

  function automatic longint sat18(longint v);
    if (v > 131071)  return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  // floor(v / 2^s) for signed v
  function automatic longint floordiv(longint v, int s);
    longint d, q;
    d = longint'(1) << s;
    q = v / d;                       // rounds towards zero
    if ((v % d) != 0 && v < 0) q = q - 1;
    return q;
  endfunction

  // activation: sign * floor(tanh(min(floor(|x|/16),1023)/256) * 4096)
  function automatic longint tanh_ref(longint x);
    longint m, idx, t;
    m   = (x < 0) ? -x : x;
    idx = m / 16;
    if (idx > 1023) idx = 1023;
    t   = longint'($floor($tanh(real'(idx) / 256.0) * 4096.0));
    return (x < 0) ? -t : t;
  endfunction

  function automatic longint u_ref(longint wx, longint b, longint x);
    return sat18(floordiv(wx * x + b * 1024, 12));
  endfunction

  function automatic longint pre_ref(longint u, longint wrow [RN], longint h [RN], int n);
    longint s;
    s = u * 16384;
    for (int k = 0; k < n; k++) s += wrow[k] * h[k];
    return sat18(floordiv(s, 14));
  endfunction

  function automatic longint dense_ref(longint wd [RN], longint bd, longint h [RN], int n);
    longint s;
    s = bd * 4096;
    for (int k = 0; k < n; k++) s += wd[k] * h[k];
    return sat18(floordiv(s, 16));
  endfunction

  // random signed value in [-r, r]
  function automatic longint rnd(longint r);
    return longint'($urandom_range(0, 32'(2 * r))) - r;
  endfunction

  typedef struct {
    longint wx [RN];
    longint b  [RN];
    longint wh [RN][RN];
    longint wd [RN];
    longint bd;
  } ref_w_t;

  // random weights in [-r, r]
  function automatic ref_w_t rnd_weights(longint r);
    ref_w_t w;
    for (int j = 0; j < RN; j++) begin
      w.wx[j] = rnd(r); w.b[j] = rnd(r / 4); w.wd[j] = rnd(r);
      for (int k = 0; k < RN; k++) w.wh[j][k] = rnd(r / 2);
    end
    w.bd = rnd(r / 4);
    return w;
  endfunction

  // energy for a window of samples xs[0] (oldest) .. xs[$size-1] (newest); the first
  // `empty` steps have never received a sample and carry an input term u = 0
  function automatic longint net_ref(ref_w_t w, longint xs [], int empty = 0);
    longint h [RN], hn [RN], u, acc;
    for (int j = 0; j < RN; j++) h[j] = 0;
    for (int t = 0; t < xs.size(); t++) begin
      for (int j = 0; j < RN; j++) begin
        u   = (t < empty) ? 0 : u_ref(w.wx[j], w.b[j], xs[t]);
        acc = u * 16384;
        for (int k = 0; k < RN; k++) acc += w.wh[j][k] * h[k];
        hn[j] = tanh_ref(sat18(floordiv(acc, 14)));
      end
      for (int j = 0; j < RN; j++) h[j] = hn[j];
    end
    acc = w.bd * 4096;
    for (int k = 0; k < RN; k++) acc += w.wd[k] * h[k];
    return sat18(floordiv(acc, 16));
  endfunction

  // parameter word at address a of the load map (Wx, b, Wh row-major, Wd, bd)
  function automatic longint w_at(ref_w_t w, int a);
    if (a < RN) return w.wx[a];
    if (a < 2 * RN) return w.b[a - RN];
    if (a < 2 * RN + RN * RN) return w.wh[(a - 2 * RN) / RN][(a - 2 * RN) % RN];
    if (a < 3 * RN + RN * RN) return w.wd[a - 2 * RN - RN * RN];
    return w.bd;
  endfunction

endpackage
