// tb_conv_sep_check -- checker used by tb_conv1d_layer
//
// Instantiates one depthwise separable conv1d_layer with the given channel
// count, kernel and input width, drives it with a random stream with gaps
// after rst_n rises, predicts every output (value and cycle, two cycles after
// its input) with direct arithmetic and reports its counts on the ports.
// done rises after N_IN inputs once all predicted outputs were seen.
module tb_conv_sep_check #(
  parameter int unsigned C    = 2,
  parameter int unsigned K    = 5,
  parameter int unsigned IN_W = 2,
  parameter int unsigned F    = 2,
  parameter int unsigned SEED = 321,
  parameter int          N_IN = 300
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  import tb_ref_pkg::*;

  logic in_valid = 0;
  logic [IN_W-1:0] din [C];
  logic ov;
  logic [1:0] dout [F];
  int cycle = 0;
  int hist [K][C];
  typedef struct { int t; int y[F]; } exp_t;
  exp_t q[$];

  conv1d_layer #(.C(C), .K(K), .F(F), .IN_W(IN_W), .MID_W(3), .OUT_W(2), .SEPARATED(1'b1),
                 .STRIDE(1), .SHIFT_DW(1), .SHIFT_PW(3), .SEED(SEED))
    dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(din), .out_valid(ov), .out_data(dout));

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && ov) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("C%0d K%0d W%0d: unexpected output", C, K, IN_W); end
    else begin
      e = q.pop_front();
      if (e.t != cycle) failures++;
      for (int f = 0; f < F; f++) if (dout[f] !== 2'(e.y[f])) begin
        failures++;
        $display("C%0d K%0d W%0d: f%0d got %0d exp %0d", C, K, IN_W, f, dout[f], e.y[f]);
      end
    end
  end

  initial begin
    int x[];
    exp_t e;
    checks = 0; failures = 0; done = 0;
    x = new[C*K];
    for (int t = 0; t < K; t++) for (int c = 0; c < C; c++) hist[t][c] = 0;
    @(posedge rst_n);
    for (int n = 0; n < N_IN; n++) begin
      @(posedge clk);
      in_valid <= ($urandom % 4) != 0;
      for (int c = 0; c < C; c++) din[c] <= IN_W'($urandom);
      #1;
      if (in_valid) begin
        for (int t = K-1; t > 0; t--) for (int c = 0; c < C; c++) hist[t][c] = hist[t-1][c];
        for (int c = 0; c < C; c++) hist[0][c] = din[c];
        for (int c = 0; c < C; c++) for (int t = 0; t < K; t++) x[c*K+t] = hist[t][c];
        e.t = cycle + 2;
        for (int f = 0; f < F; f++)
          e.y[f] = ref_sep(lutnn_pkg::child_seed(SEED, f), C, K, 3, 2, 1, 3, x);
        q.push_back(e);
      end
    end
    @(posedge clk) in_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("C%0d K%0d W%0d: %0d outputs missing", C, K, IN_W, q.size()); end
    done = 1;
  end
endmodule
