// lutnn_pkg -- shared constants and elaboration-time table precomputation
//
// The network runs every neuron as a look-up table: a neuron with N inputs of
// n_x bits each is evaluated offline for all 2^(N*n_x) input states and the
// n_y-bit results are stored in an "n-to-m cell" (n = N*n_x input bits, m =
// n_y output bits). This package holds the functions that fill those tables
// while the design elaborates, so no block memory and no multiplier is ever
// used at run time.
//
// Neuron function (follows the document's neuron equation):
//     acc = b + sum_i w_i * value(x_i),   y = number of thresholds max(0, acc) reaches
// The ReLU and the weighted sum follow the document, as does the freedom to
// let every input and output code stand for an arbitrary value (codebook
// quantisation): value() is an input codebook, the thresholds an output
// codebook. The network itself uses uniform codebooks (code k = value k,
// thresholds k * 2^SHIFT, i.e. y = min(max(0, acc) >> SHIFT, 2^m - 1)); that
// choice, and the scale of the values, are this design's.
//
// Weights and biases are meant to come from training. No trained values are
// available, so each neuron draws small integer weights in [-2, 5] and a bias
// in [-2, 2] from a deterministic hash of its SEED parameter. Replace
// neuron_weight()/neuron_bias() (or the seeds) to load a trained network.
//
// Network constants: the layer sequence follows the document's ECG
// demonstrator; widths 2/3/2 bits and kernel 3 follow its worked example of a
// depthwise separable neuron (two 6-to-3 cells feeding a 6-to-2 cell), the
// pooling length 4 follows its pooling example. Filter counts and the dense
// window are not given and are chosen here.
package lutnn_pkg;

  // ---- network dimensions ------------------------------------------------
  localparam int unsigned SAMPLE_W  = 16;  // ECG sample width (document)
  localparam int unsigned IN_CH     = 2;   // stereo ECG (document)
  localparam int unsigned ACT_W     = 2;   // n_x = n_y, activation code width
  localparam int unsigned MID_W     = 3;   // depthwise sub-neuron output width
  localparam int unsigned KERNEL    = 3;   // Conv1D kernel size N
  localparam int unsigned FILTERS   = 4;   // filters per hidden layer (chosen)
  localparam int unsigned POOL      = 4;   // pooling length
  localparam int unsigned DENSE_WIN = 4;   // pooled time steps seen by the classifier (chosen)
  localparam int unsigned N_CLASS   = 2;   // clean / artefact
  localparam int unsigned SCORE_W   = 2;   // class score width (chosen)

  // Largest table any cell of this design may hold: 2^12 entries of 4 bits.
  localparam int unsigned MAX_CELL_IN  = 12;
  localparam int unsigned MAX_CELL_OUT = 4;
  localparam int unsigned MAX_TABLE_BITS = (1 << MAX_CELL_IN) * MAX_CELL_OUT;

  typedef logic [MAX_TABLE_BITS-1:0] table_t;

  // pooling modes of pool1d
  typedef enum logic {POOL_MAX = 1'b0, POOL_AVG = 1'b1} pool_mode_e;

  // ---- deterministic parameter source ------------------------------------
  // 32-bit integer hash (xorshift-multiply), used as a reproducible
  // stand-in for trained weights.
  function automatic int unsigned hash32(int unsigned a);
    int unsigned h;
    h = a;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // weight of input i of the neuron identified by seed, in [-2, 5]
  function automatic int neuron_weight(int unsigned seed, int unsigned i);
    return int'(hash32(seed * 32'd65599 + i + 32'd1) % 32'd8) - 2;
  endfunction

  // bias of the neuron identified by seed, in [-2, 2]
  function automatic int neuron_bias(int unsigned seed);
    return int'(hash32(seed * 32'd65599 + 32'd40503) % 32'd5) - 2;
  endfunction

  // seed of a sub-unit, derived from a parent seed
  function automatic int unsigned child_seed(int unsigned seed, int unsigned k);
    return hash32(seed ^ (k * 32'h9e3779b9 + 32'd17));
  endfunction

  // ---- codebooks -----------------------------------------------------------
  // An input code does not have to mean the integer it spells: each of the
  // (at most 16) codes of an input can stand for any value (codebook_t, entry
  // k = value of code k, in the same fixed-point scale as the weights). The
  // output code is the number of thresholds (thresh_t, ascending, positive)
  // that the ReLU output reaches, so any non-uniform output quantisation can
  // be expressed. The uniform defaults give code k = value k and
  // y = min(max(0, acc) >> shift, 2^out_w - 1).
  localparam int unsigned MAX_CODES = 16;
  typedef logic signed [MAX_CODES-1:0][31:0] codebook_t;
  typedef logic signed [MAX_CODES-2:0][31:0] thresh_t;

  function automatic codebook_t uniform_codebook();
    codebook_t cb;
    for (int k = 0; k < MAX_CODES; k++) cb[k] = 32'(k);
    return cb;
  endfunction

  function automatic thresh_t uniform_thresh(int unsigned shift);
    thresh_t th;
    for (int k = 0; k < MAX_CODES - 1; k++) th[k] = 32'((k + 1) << shift);
    return th;
  endfunction

  // ReLU, then the output code: the number of thresholds reached, at most
  // 2^out_w - 1
  function automatic int unsigned relu_quant(int acc, thresh_t th, int unsigned out_w);
    int unsigned y;
    y = 0;
    if (acc <= 0) return 0;
    for (int k = 0; k < (1 << out_w) - 1; k++)
      if (acc >= int'(th[k])) y = k + 1;
    return y;
  endfunction

  // Precompute the table of an n-to-m cell for the neuron identified by seed:
  // n_in inputs of in_w bits, input i at address bits [i*in_w +: in_w] and
  // worth in_cb[code], out_w-bit result at table bits [addr*out_w +: out_w].
  function automatic table_t neuron_table(int unsigned seed, int unsigned n_in,
                                          int unsigned in_w, int unsigned out_w,
                                          codebook_t in_cb, thresh_t out_th);
    table_t tbl;
    int     acc;
    int unsigned y;
    int unsigned mask;
    int unsigned n_addr;
    tbl    = '0;
    mask   = (1 << in_w) - 1;
    n_addr = 1 << (n_in * in_w);
    for (int unsigned addr = 0; addr < n_addr; addr++) begin
      acc = neuron_bias(seed);
      for (int unsigned i = 0; i < n_in; i++)
        acc += neuron_weight(seed, i) * int'(in_cb[(addr >> (i * in_w)) & mask]);
      y = relu_quant(acc, out_th, out_w);
      for (int unsigned b = 0; b < out_w; b++)
        tbl[addr * out_w + b] = y[b];
    end
    return tbl;
  endfunction

endpackage
