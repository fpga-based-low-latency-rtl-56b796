// tb_ref_pkg -- reference arithmetic for the testbenches
//
// Evaluates neurons the direct way, with multiplications and additions on the
// actual input values, instead of through precomputed tables. The weights and
// biases are the network's parameters (lutnn_pkg::neuron_weight/neuron_bias);
// the ReLU, shift and saturation are re-implemented here so that a table that
// was built or addressed wrongly shows up as a mismatch.
package tb_ref_pkg;

  // y = min(max(0, acc) >> shift, 2^out_w - 1)
  function automatic int ref_act(int acc, int shift, int out_w);
    int v;
    if (acc < 0) acc = 0;
    v = acc / (1 << shift);
    if (v > (1 << out_w) - 1) v = (1 << out_w) - 1;
    return v;
  endfunction

  // neuron with n_in inputs, input i = x[i]
  function automatic int ref_neuron(int unsigned seed, int n_in, int out_w, int shift,
                                    int x[]);
    int acc;
    acc = lutnn_pkg::neuron_bias(seed);
    for (int i = 0; i < n_in; i++) acc += lutnn_pkg::neuron_weight(seed, i) * x[i];
    return ref_act(acc, shift, out_w);
  endfunction

  // neuron with codebooks: input code k is worth cb[k]; the output is the
  // number of thresholds th[] (ascending) that max(0, acc) reaches
  function automatic int ref_neuron_cb(int unsigned seed, int n_in, int out_w,
                                       int cb[], int th[], int x[]);
    int acc, y;
    acc = lutnn_pkg::neuron_bias(seed);
    for (int i = 0; i < n_in; i++) acc += lutnn_pkg::neuron_weight(seed, i) * cb[x[i]];
    y = 0;
    if (acc > 0)
      for (int k = 0; k < (1 << out_w) - 1; k++) if (acc >= th[k]) y = k + 1;
    return y;
  endfunction

  // depthwise separable neuron; x[g*taps + t] = channel g, tap t
  function automatic int ref_sep(int unsigned seed, int groups, int taps, int mid_w,
                                 int out_w, int sh_dw, int sh_pw, int x[]);
    int mid[];
    int sub[];
    mid = new[groups];
    sub = new[taps];
    for (int g = 0; g < groups; g++) begin
      for (int t = 0; t < taps; t++) sub[t] = x[g*taps + t];
      mid[g] = ref_neuron(lutnn_pkg::child_seed(seed, g + 1), taps, mid_w, sh_dw, sub);
    end
    return ref_neuron(lutnn_pkg::child_seed(seed, 0), groups, out_w, sh_pw, mid);
  endfunction

endpackage
