// input_quantizer -- reduces wide sensor samples to low-width activation codes
//
// The first layer's look-up tables can only take a few bits per input, so the
// signed SAMPLE_W-bit samples of each channel are turned into OUT_W-bit codes
// before they enter the first push register. The code is the number of
// thresholds the sample reaches: code k means T[k-1] <= sample < T[k]. The
// 2^OUT_W - 1 thresholds are a parameter, ascending (default: uniform over
// the signed range, written for SAMPLE_W = 16 and OUT_W = 2), so a trained, non-uniform input codebook can be loaded. The
// document only says the network sees an n-bit sampled version of its input
// channels; the comparator bank is this design's.
//
// Interface: in_valid/in_sample[CH] -> out_valid/out_code[CH].
// Timing: one register stage (in cycle n -> out cycle n+1). Reset synchronous,
// active low.
module input_quantizer #(
  parameter int unsigned CH       = 2,
  parameter int unsigned SAMPLE_W = 16,
  parameter int unsigned OUT_W    = 2,
  parameter logic signed [SAMPLE_W-1:0] THRESH [2**OUT_W-1] = '{-16'sd16384, 16'sd0, 16'sd16384}
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] in_sample [CH],
  output logic                       out_valid,
  output logic        [OUT_W-1:0]    out_code  [CH]
);

  logic [OUT_W-1:0] code [CH];

  always_comb begin
    for (int c = 0; c < CH; c++) begin
      code[c] = '0;
      for (int k = 0; k < 2**OUT_W - 1; k++)
        if (in_sample[c] >= THRESH[k]) code[c] = OUT_W'(k + 1);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int c = 0; c < CH; c++) out_code[c] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int c = 0; c < CH; c++) out_code[c] <= code[c];
    end
  end

endmodule
