// lut_cell -- n-to-m cell: a combinational look-up table
//
// An n-to-m cell holds one m-bit entry for each of the 2^n input states. On an
// FPGA it maps onto m * 2^(n-6) six-input LUTs, so the whole neuron is logic,
// with no block RAM and no multiplier. The table is a parameter, filled at
// elaboration time (see lutnn_pkg::neuron_table); the default is the table
// of an example neuron with N_IN/2 two-bit inputs.
//
// Interface: addr (N_IN bits) selects entry addr; dout = TABLE[addr*N_OUT +:
// N_OUT]. Timing: purely combinational; the enclosing layer registers it.
module lut_cell #(
  parameter int unsigned N_IN  = 6,
  parameter int unsigned N_OUT = 3,
  parameter logic [(2**N_IN)*N_OUT-1:0] TABLE =
    ((2**N_IN)*N_OUT)'(lutnn_pkg::neuron_table(32'd1, N_IN / 2, 2, N_OUT,
                                             lutnn_pkg::uniform_codebook(),
                                             lutnn_pkg::uniform_thresh(1)))
) (
  input  logic [N_IN-1:0]  addr,
  output logic [N_OUT-1:0] dout
);

  always_comb dout = TABLE[addr*N_OUT +: N_OUT];

endmodule
