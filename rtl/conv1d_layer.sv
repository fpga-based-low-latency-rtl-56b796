// conv1d_layer -- streaming one-dimensional convolution layer
//
// y_f(t) = max(0, sum_c sum_i w_{i,c,f} * x_c(t-i) + b_f) for F filters over
// C input channels and a kernel of K taps. A push register of depth K (one
// C*IN_W-bit word per time step) keeps the K most recent input vectors, which
// reduces the convolution to a dense layer: F neurons read the whole window in
// parallel. Neurons are either depthwise separable (SEPARATED = 1, one
// sep_neuron per filter) or a single cell over all K*C inputs (SEPARATED = 0,
// the regular input layer). A stride S > 1 is obtained, as the document
// suggests, by evaluating the neurons only on every S-th input.
//
// Interface: in_valid/in_data carry one input vector per valid cycle (no
// back-pressure: the layer accepts one vector every clock). out_valid pulses
// with out_data[f] for each evaluated position.
// Timing: in_valid in cycle n -> out_valid in cycle n+2 (push register, then
// output register). With stride S, the outputs belong to inputs S-1, 2S-1, ...
// counted from reset. Reset is synchronous, active low; the push register
// restarts from code 0 (zero padding). These timing details are this design's.
module conv1d_layer #(
  parameter int unsigned C         = 4,
  parameter int unsigned K         = 3,
  parameter int unsigned F         = 4,
  parameter int unsigned IN_W      = 2,
  parameter int unsigned MID_W     = 3,
  parameter int unsigned OUT_W     = 2,
  parameter bit          SEPARATED = 1'b1,
  parameter int unsigned STRIDE    = 1,
  parameter int unsigned SHIFT_DW  = 1,
  parameter int unsigned SHIFT_PW  = 3,
  parameter int unsigned SEED      = 100
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  in_data  [C],
  output logic             out_valid,
  output logic [OUT_W-1:0] out_data [F]
);

  localparam int unsigned CNT_W = (STRIDE > 1) ? $clog2(STRIDE) : 1;

  logic [C*IN_W-1:0]   in_word;
  logic [C*IN_W-1:0]   taps [K];
  logic [C*K*IN_W-1:0] window;    // channel c, tap t at [(c*K+t)*IN_W]
  logic [OUT_W-1:0]    y [F];
  logic [CNT_W-1:0]    phase;
  logic                fire_q;

  always_comb
    for (int c = 0; c < C; c++) in_word[c*IN_W +: IN_W] = in_data[c];

  push_register #(
    .WIDTH(C*IN_W),
    .DEPTH(K)
  ) u_push (
    .clk  (clk),
    .rst_n(rst_n),
    .push (in_valid),
    .din  (in_word),
    .taps (taps)
  );

  always_comb
    for (int c = 0; c < C; c++)
      for (int t = 0; t < K; t++)
        window[(c*K+t)*IN_W +: IN_W] = taps[t][c*IN_W +: IN_W];

  for (genvar f = 0; f < F; f++) begin : g_filter
    if (SEPARATED) begin : g_sep
      sep_neuron #(
        .GROUPS  (C),
        .TAPS    (K),
        .IN_W    (IN_W),
        .MID_W   (MID_W),
        .OUT_W   (OUT_W),
        .SHIFT_DW(SHIFT_DW),
        .SHIFT_PW(SHIFT_PW),
        .SEED    (lutnn_pkg::child_seed(SEED, f))
      ) u_neuron (
        .x(window),
        .y(y[f])
      );
    end else begin : g_reg
      lut_neuron #(
        .N_INPUTS(C*K),
        .IN_W    (IN_W),
        .OUT_W   (OUT_W),
        .SHIFT   (SHIFT_PW),
        .SEED    (lutnn_pkg::child_seed(SEED, f))
      ) u_neuron (
        .x(window),
        .y(y[f])
      );
    end
  end

  // stride: only every STRIDE-th input triggers an evaluation
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase  <= '0;
      fire_q <= 1'b0;
    end else begin
      fire_q <= 1'b0;
      if (in_valid) begin
        if (phase == CNT_W'(STRIDE - 1)) begin
          phase  <= '0;
          fire_q <= 1'b1;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int f = 0; f < F; f++) out_data[f] <= '0;
    end else begin
      out_valid <= fire_q;
      if (fire_q)
        for (int f = 0; f < F; f++) out_data[f] <= y[f];
    end
  end

  // an output only ever follows an accepted input two cycles earlier, and with
  // a stride of S two outputs are at least S cycles apart
  a_out_after_in: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(in_valid, 2));
  if (STRIDE > 1) begin : g_stride_check
    a_stride_gap: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid |=> !out_valid);
  end

endmodule
