// lut_neuron -- one neuron, precomputed into an n-to-m cell
//
// Computes y = clip(max(0, sum_i w_i*x_i + b) >> SHIFT) for N_INPUTS inputs
// of IN_W bits (or, with IN_CODEBOOK / OUT_THRESH, any codebook-quantised
// version of it), but not with adders and multipliers: the function is
// evaluated at elaboration time for every one of the 2^(N_INPUTS*IN_W) input
// states (lutnn_pkg::neuron_table) and the results become the table of a
// lut_cell. The weights stay arbitrary numbers; only inputs and outputs are
// quantised. Weights and bias come from the neuron's SEED (stand-in for
// trained values, see lutnn_pkg).
//
// Interface: x packs input i in bits [i*IN_W +: IN_W]; y is OUT_W bits.
// Timing: combinational.
module lut_neuron #(
  parameter int unsigned N_INPUTS = 3,
  parameter int unsigned IN_W     = 2,
  parameter int unsigned OUT_W    = 3,
  parameter int unsigned SHIFT    = 1,
  parameter int unsigned SEED     = 1,
  // value of each input code, and the output thresholds (see lutnn_pkg)
  parameter lutnn_pkg::codebook_t IN_CODEBOOK = lutnn_pkg::uniform_codebook(),
  parameter lutnn_pkg::thresh_t   OUT_THRESH  = lutnn_pkg::uniform_thresh(SHIFT)
) (
  input  logic [N_INPUTS*IN_W-1:0] x,
  output logic [OUT_W-1:0]         y
);

  localparam int unsigned CELL_IN = N_INPUTS * IN_W;
  localparam logic [(2**CELL_IN)*OUT_W-1:0] TABLE =
    ((2**CELL_IN)*OUT_W)'(lutnn_pkg::neuron_table(SEED, N_INPUTS, IN_W, OUT_W, IN_CODEBOOK, OUT_THRESH));

  lut_cell #(
    .N_IN (CELL_IN),
    .N_OUT(OUT_W),
    .TABLE(TABLE)
  ) u_cell (
    .addr(x),
    .dout(y)
  );

endmodule
