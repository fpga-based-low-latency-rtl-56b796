// push_register -- shift register holding the DEPTH most recent stream values
//
// This is the "push register" that turns a streaming Conv1D into a dense
// layer: each time a new value is pushed, every stage moves one place along,
// so the register always holds x(t), x(t-1), ..., x(t-DEPTH+1) and the
// neurons behind it read all kernel taps in parallel. The same structure
// collects the values of a pooling window.
//
// Interface: push (one cycle) shifts din into taps[0]; taps[k] is the value
// pushed k pushes ago. Timing: taps are registered, visible the cycle after
// the push. Reset (synchronous, active low) clears every stage to code 0,
// which acts as zero padding at the start of a stream (this design's choice;
// the document does not describe reset).
module push_register #(
  parameter int unsigned WIDTH = 2,
  parameter int unsigned DEPTH = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] taps [DEPTH]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) taps[k] <= '0;
    end else if (push) begin
      taps[0] <= din;
      for (int k = 1; k < DEPTH; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
