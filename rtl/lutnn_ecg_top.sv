// lutnn_ecg_top -- memory-free LUT network for ECG artefact detection
//
// A stereo ECG stream (two signed 16-bit channels) is classified sample by
// sample by a fully pipelined network in which every neuron is a precomputed
// look-up table and every activation lives in a register, so no block RAM and
// no DSP block is used. Layer sequence (from the document's demonstrator):
//
//   input_quantizer   16 bit -> 2-bit codes, 2 channels
//   conv0             regular Conv1D, 2 ch -> 4 filters, kernel 3 (12-to-2 cells)
//   pool0             max pooling, 4
//   conv1..conv3      depthwise separable Conv1D, 4 -> 4, kernel 3
//   pool1             max pooling, 4
//   conv4             depthwise separable Conv1D, 4 -> 4, kernel 3
//   pool2             max pooling, 4
//   dense             dense classifier over the last 4 pooled steps, 2 classes
//
// Filter counts, pooling length, classifier window and all timing are this
// design's choices; the document gives the sequence and the cell structure.
//
// Interface: in_valid/in_sample[2]: one stereo sample per valid cycle, at most
// one per clock, no back-pressure. out_valid pulses once per 64 input samples
// (three pooling stages of 4) with out_class (1 = artefact) and the two class
// scores. Timing: the 64th sample of a block in cycle n gives out_valid in
// cycle n+19 (1 quantizer + 5 x 2 conv + 3 x 2 pool + 2 classifier).
// Reset synchronous, active low.
module lutnn_ecg_top
  import lutnn_pkg::*;
#(
  parameter int unsigned FILT = FILTERS,
  parameter int unsigned PL   = POOL
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] in_sample [IN_CH],
  output logic                       out_valid,
  output logic                       out_class,
  output logic [SCORE_W-1:0]         out_score [N_CLASS]
);

  logic             q_valid;
  logic [ACT_W-1:0] q_code [IN_CH];

  input_quantizer #(
    .CH      (IN_CH),
    .SAMPLE_W(SAMPLE_W),
    .OUT_W   (ACT_W)
  ) u_quant (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_sample(in_sample),
    .out_valid(q_valid),
    .out_code (q_code)
  );

  // ---- conv0: regular (not separated) input layer ------------------------
  logic             c0_valid;
  logic [ACT_W-1:0] c0_data [FILT];

  conv1d_layer #(
    .C(IN_CH), .K(KERNEL), .F(FILT), .IN_W(ACT_W), .MID_W(MID_W), .OUT_W(ACT_W),
    .SEPARATED(1'b0), .STRIDE(1), .SHIFT_DW(1), .SHIFT_PW(2), .SEED(1000)
  ) u_conv0 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(q_valid), .in_data(q_code),
    .out_valid(c0_valid), .out_data(c0_data)
  );

  logic             p0_valid;
  logic [ACT_W-1:0] p0_data [FILT];

  pool1d #(.CH(FILT), .W(ACT_W), .P(PL), .MODE(POOL_MAX)) u_pool0 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(c0_valid), .in_data(c0_data),
    .out_valid(p0_valid), .out_data(p0_data)
  );

  // ---- conv1..conv3: depthwise separable --------------------------------
  logic             s_valid [4];
  logic [ACT_W-1:0] s_data  [4][FILT];

  assign s_valid[0] = p0_valid;
  assign s_data[0]  = p0_data;

  for (genvar l = 0; l < 3; l++) begin : g_sep
    conv1d_layer #(
      .C(FILT), .K(KERNEL), .F(FILT), .IN_W(ACT_W), .MID_W(MID_W), .OUT_W(ACT_W),
      .SEPARATED(1'b1), .STRIDE(1), .SHIFT_DW(1), .SHIFT_PW(3), .SEED(2000 + l)
    ) u_conv (
      .clk(clk), .rst_n(rst_n),
      .in_valid(s_valid[l]), .in_data(s_data[l]),
      .out_valid(s_valid[l+1]), .out_data(s_data[l+1])
    );
  end

  logic             p1_valid;
  logic [ACT_W-1:0] p1_data [FILT];

  pool1d #(.CH(FILT), .W(ACT_W), .P(PL), .MODE(POOL_MAX)) u_pool1 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(s_valid[3]), .in_data(s_data[3]),
    .out_valid(p1_valid), .out_data(p1_data)
  );

  // ---- conv4: depthwise separable ----------------------------------------
  logic             c4_valid;
  logic [ACT_W-1:0] c4_data [FILT];

  conv1d_layer #(
    .C(FILT), .K(KERNEL), .F(FILT), .IN_W(ACT_W), .MID_W(MID_W), .OUT_W(ACT_W),
    .SEPARATED(1'b1), .STRIDE(1), .SHIFT_DW(1), .SHIFT_PW(3), .SEED(3000)
  ) u_conv4 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(p1_valid), .in_data(p1_data),
    .out_valid(c4_valid), .out_data(c4_data)
  );

  logic             p2_valid;
  logic [ACT_W-1:0] p2_data [FILT];

  pool1d #(.CH(FILT), .W(ACT_W), .P(PL), .MODE(POOL_MAX)) u_pool2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(c4_valid), .in_data(c4_data),
    .out_valid(p2_valid), .out_data(p2_data)
  );

  // ---- dense classifier ---------------------------------------------------
  dense_classifier #(
    .C(FILT), .WIN(DENSE_WIN), .IN_W(ACT_W), .MID_W(MID_W), .SCORE_W(SCORE_W),
    .N_CLASS(N_CLASS), .SHIFT_DW(1), .SHIFT_PW(3), .SEED(4000)
  ) u_dense (
    .clk(clk), .rst_n(rst_n),
    .in_valid(p2_valid), .in_data(p2_data),
    .out_valid(out_valid), .out_class(out_class), .out_score(out_score)
  );

endmodule
