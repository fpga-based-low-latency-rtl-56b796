// pool1d -- one-dimensional max or average pooling
//
// Per channel, a push register collects the last P values; after every P-th
// valid input the window is reduced to one value: the maximum (MODE =
// POOL_MAX) or the average (MODE = POOL_AVG, a low-width sum divided by P and
// rounded down so the output keeps the input width). Pooling therefore also
// divides the sample rate by P, so the layers behind it switch P times less
// often and each of their values covers P times the time span.
//
// Interface: in_valid/in_data[CH] as a stream, one vector per valid cycle;
// out_valid pulses with out_data[CH]. Windows do not overlap (pool stride =
// P, this design's choice). Timing: the P-th input of a window in cycle n ->
// out_valid in cycle n+2. Reset synchronous, active low, restarts the window.
module pool1d #(
  parameter int unsigned         CH   = 4,
  parameter int unsigned         W    = 2,
  parameter int unsigned         P    = 4,
  parameter lutnn_pkg::pool_mode_e MODE = lutnn_pkg::POOL_MAX
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data  [CH],
  output logic         out_valid,
  output logic [W-1:0] out_data [CH]
);

  localparam int unsigned CNT_W = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned SUM_W = W + CNT_W + 1;

  logic [CNT_W-1:0] phase;
  logic             fire_q;
  logic [W-1:0]     red [CH];

  for (genvar c = 0; c < CH; c++) begin : g_ch
    logic [W-1:0] taps [P];

    push_register #(
      .WIDTH(W),
      .DEPTH(P)
    ) u_push (
      .clk  (clk),
      .rst_n(rst_n),
      .push (in_valid),
      .din  (in_data[c]),
      .taps (taps)
    );

    always_comb begin
      logic [W-1:0]     mx;
      logic [SUM_W-1:0] sum;
      mx  = '0;
      sum = '0;
      for (int k = 0; k < P; k++) begin
        if (taps[k] > mx) mx = taps[k];
        sum = sum + SUM_W'(taps[k]);
      end
      if (MODE == lutnn_pkg::POOL_MAX) red[c] = mx;
      else                             red[c] = W'(sum / SUM_W'(P));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase  <= '0;
      fire_q <= 1'b0;
    end else begin
      fire_q <= 1'b0;
      if (in_valid) begin
        if (phase == CNT_W'(P - 1)) begin
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
      for (int c = 0; c < CH; c++) out_data[c] <= '0;
    end else begin
      out_valid <= fire_q;
      if (fire_q)
        for (int c = 0; c < CH; c++) out_data[c] <= red[c];
    end
  end

  // a pooled output only ever follows an accepted input two cycles earlier
  // and never comes in two consecutive cycles (P > 1)
  a_out_after_in: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(in_valid, 2));
  if (P > 1) begin : g_rate_check
    a_rate: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid |=> !out_valid);
  end

endmodule
