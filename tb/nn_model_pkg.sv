// nn_model_pkg: holds the nn_model class, a bit-exact integer reference of
// the positioning network and helpers for its parameter load port.
package nn_model_pkg;
// nn_model: bit-exact integer reference of the positioning network as the
// accelerator computes it (INT8 layer 1 with ReLU and a right shift, batch
// normalisation by truncating division, three 16-bit Q8.8 layers), and the
// helpers that write its parameters through the accelerator's load port.
// Parameters are generated from a seed, so testbenches need no data files.
class nn_model #(int N_IN = 1024, int N_H1 = 200, int N_H2 = 100, int N_H3 = 20,
                 int N_OUT = 5, int PARA_IN1 = 512, int PARA_IN3 = 10, int L1_SHIFT = 6);
  byte         w1 [N_IN][N_H1];
  shortint     bn_mean [N_H1], bn_sd [N_H1], bn_g [N_H1], bn_b [N_H1];
  shortint     w2 [N_H1][N_H2];
  shortint     w3 [N_H2][N_H3];
  shortint     w4 [N_H3][N_OUT];

  static function longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  static function int srand(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  function void randomize_params();
    foreach (w1[i, j]) w1[i][j] = byte'(srand(-128, 127));
    for (int k = 0; k < N_H1; k++) begin
      bn_mean[k] = shortint'(srand(0, 2000));
      bn_sd[k]   = shortint'(srand(256, 2048));
      if (k % 37 == 5) bn_sd[k] = shortint'(srand(1, 8));   // forces saturation
      bn_g[k]    = shortint'(srand(-512, 512));
      bn_b[k]    = shortint'(srand(-512, 512));
    end
    foreach (w2[i, j]) w2[i][j] = shortint'(srand(-64, 64));
    foreach (w3[i, j]) w3[i][j] = shortint'(srand(-64, 64));
    foreach (w4[i, j]) w4[i][j] = shortint'(srand(-64, 64));
  endfunction

  // reference inference; x: N_IN signed bytes
  function void infer(input byte x [N_IN], output shortint y [N_OUT]);
    longint acc;
    shortint h1 [N_H1], bn [N_H1], h2 [N_H2], h3 [N_H3];
    for (int o = 0; o < N_H1; o++) begin
      acc = 0;
      for (int i = 0; i < N_IN; i++) acc += longint'(x[i]) * longint'(w1[i][o]);
      acc = acc >>> L1_SHIFT;
      h1[o] = (acc < 0) ? 16'sd0 : shortint'(sat16(acc));
    end
    for (int k = 0; k < N_H1; k++) begin
      longint d, ad, asd, q, qs;
      d   = sat16(longint'(h1[k]) - longint'(bn_mean[k]));
      ad  = (d < 0) ? -d : d;
      asd = (bn_sd[k] < 0) ? -longint'(bn_sd[k]) : longint'(bn_sd[k]);
      q   = (asd == 0) ? 64'hffffff : (ad * 256) / asd;
      if (q > 32767) qs = 32767; else qs = q;
      if ((d < 0) != (bn_sd[k] < 0)) qs = -qs;
      bn[k] = shortint'(sat16(((qs * longint'(bn_g[k])) >>> 8) + longint'(bn_b[k])));
    end
    for (int j = 0; j < N_H2; j++) begin
      acc = 0;
      for (int k = 0; k < N_H1; k++) acc += longint'(bn[k]) * longint'(w2[k][j]);
      acc = acc >>> 8;
      h2[j] = (acc < 0) ? 16'sd0 : shortint'(sat16(acc));
    end
    for (int o = 0; o < N_H3; o++) begin
      acc = 0;
      for (int i = 0; i < N_H2; i++) acc += longint'(h2[i]) * longint'(w3[i][o]);
      acc = acc >>> 8;
      h3[o] = (acc < 0) ? 16'sd0 : shortint'(sat16(acc));
    end
    for (int k = 0; k < N_OUT; k++) begin
      acc = 0;
      for (int o = 0; o < N_H3; o++) acc += longint'(h3[o]) * longint'(w4[o][k]);
      y[k] = shortint'(sat16(acc >>> 8));
    end
  endfunction

  // load-port address of each parameter, in the accelerator's storage layout
  static function int log2c(int v);
    int r; r = 0; while ((1 << r) < v) r++; return r;
  endfunction
  function int a1(int i, int o);        // layer 1 byte
    int ch, t, lw;
    ch = N_IN / PARA_IN1; lw = (PARA_IN1 <= 1) ? 1 : log2c(PARA_IN1);
    t  = (o / 2) * ch + i / PARA_IN1;
    return (t << (lw + 1)) | ((i % PARA_IN1) << 1) | (o % 2);
  endfunction
  function int abn(int k, int sel); return (k << 2) | sel; endfunction
  function int a2(int k, int j); return (k << log2c(N_H2)) | j; endfunction
  function int a3(int i, int o);
    int ch, lw;
    ch = N_H2 / PARA_IN3; lw = (PARA_IN3 <= 1) ? 1 : log2c(PARA_IN3);
    return ((o * ch + i / PARA_IN3) << lw) | (i % PARA_IN3);
  endfunction
  function int a4(int o, int k); return (o << ((N_OUT <= 1) ? 1 : log2c(N_OUT))) | k; endfunction
endclass
endpackage
