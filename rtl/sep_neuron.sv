// sep_neuron -- depthwise separable neuron (one per filter)
//
// A neuron with GROUPS*TAPS inputs would need a table of 2^(GROUPS*TAPS*IN_W)
// entries. Splitting it the depthwise-separable way keeps every table small:
// one sub-neuron per input channel (group) sees that channel's TAPS kernel
// taps and produces a MID_W-bit partial result (with ReLU); a pointwise
// neuron then combines the GROUPS partial results into the OUT_W-bit output
// (with ReLU). With the defaults this is two 6-to-3 cells feeding a 6-to-2
// cell, the document's example. Each filter has its own copy, including its
// own sub-neurons.
//
// Interface: x packs channel g, tap t at bits [(g*TAPS+t)*IN_W +: IN_W];
// y is OUT_W bits. Timing: combinational (two cell levels).
// Seeds: sub-neuron g uses child_seed(SEED, g+1), pointwise child_seed(SEED, 0).
module sep_neuron #(
  parameter int unsigned GROUPS   = 2,
  parameter int unsigned TAPS     = 3,
  parameter int unsigned IN_W     = 2,
  parameter int unsigned MID_W    = 3,
  parameter int unsigned OUT_W    = 2,
  parameter int unsigned SHIFT_DW = 1,
  parameter int unsigned SHIFT_PW = 2,
  parameter int unsigned SEED     = 1
) (
  input  logic [GROUPS*TAPS*IN_W-1:0] x,
  output logic [OUT_W-1:0]            y
);

  logic [GROUPS*MID_W-1:0] mid;

  for (genvar g = 0; g < GROUPS; g++) begin : g_dw
    lut_neuron #(
      .N_INPUTS(TAPS),
      .IN_W    (IN_W),
      .OUT_W   (MID_W),
      .SHIFT   (SHIFT_DW),
      .SEED    (lutnn_pkg::child_seed(SEED, g + 1))
    ) u_dw (
      .x(x[g*TAPS*IN_W +: TAPS*IN_W]),
      .y(mid[g*MID_W +: MID_W])
    );
  end

  lut_neuron #(
    .N_INPUTS(GROUPS),
    .IN_W    (MID_W),
    .OUT_W   (OUT_W),
    .SHIFT   (SHIFT_PW),
    .SEED    (lutnn_pkg::child_seed(SEED, 0))
  ) u_pw (
    .x(mid),
    .y(y)
  );

endmodule
