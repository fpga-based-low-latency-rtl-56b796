// tb_ecg_model_pkg -- behavioural model of lutnn_ecg_top and a synthetic ECG
//
// ecg_model evaluates the whole network with direct arithmetic (tb_ref_pkg):
// quantizer, conv0 (regular), three separable convolutions, conv4, three max
// pooling stages of 4 and the dense classifier, using the same seeds and
// shifts as lutnn_ecg_top. step() takes one valid stereo sample and, when it
// completes a block of 64, appends the predicted decision with the cycle it
// must appear in (LAT cycles after the sample). It also counts how often the
// ReLU clipped to zero and how often an output saturated.
//
// ecg_sample() produces a synthetic ECG: baseline wander, a QRS-like spike
// every 416 samples (72 beats/min at 500 Hz) and, where requested, artefacts
// (full-scale clipping or large random noise).
package tb_ecg_model_pkg;
  import tb_ref_pkg::*;
  import lutnn_pkg::*;

  localparam int LAT = 19;

  typedef struct { longint t; int s[2]; int c; } exp_t;

  class ecg_model;
    exp_t q[$];
    int h0 [3][2];
    int hs [4][3][4];
    int hd [4][4];
    int pb [3][4][4];
    int pn [3];
    int n_zero, n_sat;
    int n_pool [3];

    function new();
      n_zero = 0;
      n_sat  = 0;
      for (int s = 0; s < 3; s++) n_pool[s] = 0;
      reset();
    endfunction

    function void reset();
      for (int t = 0; t < 3; t++) for (int c = 0; c < 2; c++) h0[t][c] = 0;
      for (int l = 0; l < 4; l++) for (int t = 0; t < 3; t++) for (int c = 0; c < 4; c++) hs[l][t][c] = 0;
      for (int t = 0; t < 4; t++) for (int c = 0; c < 4; c++) hd[t][c] = 0;
      for (int s = 0; s < 3; s++) pn[s] = 0;
    endfunction

    function void note(int y);
      if (y == 0) n_zero++;
      if (y == 3) n_sat++;
    endfunction

    static function int quant(int s);
      return (s >= -16384 ? 1 : 0) + (s >= 0 ? 1 : 0) + (s >= 16384 ? 1 : 0);
    endfunction

    function void sep_layer(int l, int unsigned seed, int v[4], output int y[4]);
      int x[];
      x = new[12];
      for (int t = 2; t > 0; t--) for (int c = 0; c < 4; c++) hs[l][t][c] = hs[l][t-1][c];
      for (int c = 0; c < 4; c++) hs[l][0][c] = v[c];
      for (int c = 0; c < 4; c++) for (int t = 0; t < 3; t++) x[c*3+t] = hs[l][t][c];
      for (int f = 0; f < 4; f++) begin
        y[f] = ref_sep(child_seed(seed, f), 4, 3, 3, 2, 1, 3, x);
        note(y[f]);
      end
    endfunction

    function bit pool(int s, int v[4], output int y[4]);
      for (int c = 0; c < 4; c++) pb[s][pn[s]][c] = v[c];
      pn[s]++;
      for (int c = 0; c < 4; c++) y[c] = 0;
      if (pn[s] < 4) return 0;
      pn[s] = 0;
      n_pool[s]++;
      for (int c = 0; c < 4; c++)
        for (int k = 0; k < 4; k++) if (pb[s][k][c] > y[c]) y[c] = pb[s][k][c];
      return 1;
    endfunction

    function void step(int s0, int s1, longint tc);
      int x[];
      int v[4];
      int w[4];
      exp_t e;
      x = new[6];
      for (int t = 2; t > 0; t--) for (int c = 0; c < 2; c++) h0[t][c] = h0[t-1][c];
      h0[0][0] = quant(s0);
      h0[0][1] = quant(s1);
      for (int c = 0; c < 2; c++) for (int t = 0; t < 3; t++) x[c*3+t] = h0[t][c];
      for (int f = 0; f < 4; f++) begin
        v[f] = ref_neuron(child_seed(1000, f), 6, 2, 2, x);
        note(v[f]);
      end
      if (!pool(0, v, w)) return;
      sep_layer(0, 2000, w, v);
      sep_layer(1, 2001, v, w);
      sep_layer(2, 2002, w, v);
      if (!pool(1, v, w)) return;
      sep_layer(3, 3000, w, v);
      if (!pool(2, v, w)) return;
      for (int t = 3; t > 0; t--) for (int c = 0; c < 4; c++) hd[t][c] = hd[t-1][c];
      for (int c = 0; c < 4; c++) hd[0][c] = w[c];
      x = new[16];
      for (int c = 0; c < 4; c++) for (int t = 0; t < 4; t++) x[c*4+t] = hd[t][c];
      for (int k = 0; k < 2; k++) e.s[k] = ref_sep(child_seed(4000, k), 4, 4, 3, 2, 1, 3, x);
      e.c = (e.s[1] > e.s[0]) ? 1 : 0;
      e.t = tc + LAT;
      q.push_back(e);
    endfunction
  endclass

  function automatic int ecg_sample(int rec, int ch, int n, bit artefact);
    int base, qrs, ph, v;
    real a;
    a    = 2.0 * 3.14159265 * real'(n) / 1500.0 + real'(rec % 7 + ch);
    base = int'(6000.0 * $sin(a));
    ph   = (n + 37 * ch + 100 * rec) % 416;
    qrs  = (ph < 12) ? (ph < 6 ? ph * 3500 : (12 - ph) * 3500) : 0;
    v    = base + qrs - ((ph >= 12 && ph < 16) ? 9000 : 0);
    if (artefact) begin
      if (($urandom % 3) == 0) v = (($urandom % 2) == 1) ? 32767 : -32768;
      else                     v = int'($signed(16'($urandom)));
    end
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction
endpackage
