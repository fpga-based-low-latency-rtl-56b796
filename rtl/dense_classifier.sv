// dense_classifier -- final dense layer and class decision
//
// The classifier sees the last WIN pooled feature vectors (C channels of IN_W
// bits each), kept in a push register, and scores N_CLASS classes. Each class
// score is a dense neuron over all WIN*C inputs; to keep every table small it
// is built as a tree the same way as a depthwise separable neuron: one
// sub-neuron per channel over its WIN time steps, then one neuron combining
// the channels (sep_neuron). The decision is the class with the highest score,
// the lowest index winning a tie (class 0 = clean signal, 1 = artefact).
//
// Interface: in_valid/in_data[C] as a stream; out_valid pulses with
// out_class and the scores. A decision is made for every valid input (the
// window slides by one pooled step). Timing: in cycle n -> out cycle n+2.
// The document names only "a final dense classifier"; the window, the tree
// split and the argmax are this design's choices.
module dense_classifier #(
  parameter int unsigned C        = 4,
  parameter int unsigned WIN      = 4,
  parameter int unsigned IN_W     = 2,
  parameter int unsigned MID_W    = 3,
  parameter int unsigned SCORE_W  = 2,
  parameter int unsigned N_CLASS  = 2,
  parameter int unsigned SHIFT_DW = 1,
  parameter int unsigned SHIFT_PW = 3,
  parameter int unsigned SEED     = 900
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [IN_W-1:0]            in_data  [C],
  output logic                       out_valid,
  output logic [$clog2(N_CLASS)-1:0] out_class,
  output logic [SCORE_W-1:0]         out_score [N_CLASS]
);

  localparam int unsigned CLS_W = $clog2(N_CLASS);

  logic [C*IN_W-1:0]     in_word;
  logic [C*IN_W-1:0]     taps [WIN];
  logic [C*WIN*IN_W-1:0] window;
  logic [SCORE_W-1:0]    score [N_CLASS];
  logic [CLS_W-1:0]      best;
  logic                  valid_q;

  always_comb
    for (int c = 0; c < C; c++) in_word[c*IN_W +: IN_W] = in_data[c];

  push_register #(
    .WIDTH(C*IN_W),
    .DEPTH(WIN)
  ) u_push (
    .clk  (clk),
    .rst_n(rst_n),
    .push (in_valid),
    .din  (in_word),
    .taps (taps)
  );

  always_comb
    for (int c = 0; c < C; c++)
      for (int t = 0; t < WIN; t++)
        window[(c*WIN+t)*IN_W +: IN_W] = taps[t][c*IN_W +: IN_W];

  for (genvar k = 0; k < N_CLASS; k++) begin : g_class
    sep_neuron #(
      .GROUPS  (C),
      .TAPS    (WIN),
      .IN_W    (IN_W),
      .MID_W   (MID_W),
      .OUT_W   (SCORE_W),
      .SHIFT_DW(SHIFT_DW),
      .SHIFT_PW(SHIFT_PW),
      .SEED    (lutnn_pkg::child_seed(SEED, k))
    ) u_score (
      .x(window),
      .y(score[k])
    );
  end

  always_comb begin
    best = '0;
    for (int k = 1; k < N_CLASS; k++)
      if (score[k] > score[best]) best = CLS_W'(k);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q   <= 1'b0;
      out_valid <= 1'b0;
      out_class <= '0;
      for (int k = 0; k < N_CLASS; k++) out_score[k] <= '0;
    end else begin
      valid_q   <= in_valid;
      out_valid <= valid_q;
      if (valid_q) begin
        out_class <= best;
        for (int k = 0; k < N_CLASS; k++) out_score[k] <= score[k];
      end
    end
  end

endmodule
