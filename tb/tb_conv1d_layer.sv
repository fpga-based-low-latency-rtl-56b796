// tb_conv1d_layer -- self-checking test of conv1d_layer
// DUT A: depthwise separable, 4 channels, kernel 3, 4 filters, stride 1.
// DUT B: regular (one 12-to-2 cell per filter), 2 channels, kernel 3,
//        4 filters, stride 2.
// A random 2-bit stream with random gaps is fed to both. A software model
// keeps the input history, evaluates every filter directly and predicts each
// output and the cycle it appears in (two cycles after the input, every
// STRIDE-th input for B). Also checks that no unexpected output appears.
// Two more separable layers run the largest kernels that keep cells small:
// K = 5 with 2-bit inputs and K = 10 with 1-bit inputs (10-to-3 depthwise
// cells), checked by tb_conv_sep_check.
module tb_conv1d_layer;
  import tb_ref_pkg::*;
  localparam int unsigned SEED_A = 555, SEED_B = 777;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] in_a [4];
  logic [1:0] in_b [2];
  logic       va, vb;
  logic [1:0] oa [4];
  logic [1:0] ob [4];
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { int t; int y[4]; } exp_t;
  exp_t qa[$], qb[$];
  int ha [3][4];
  int hb [3][2];
  int nb = 0;

  conv1d_layer #(.C(4), .K(3), .F(4), .IN_W(2), .MID_W(3), .OUT_W(2), .SEPARATED(1'b1),
                 .STRIDE(1), .SHIFT_DW(1), .SHIFT_PW(3), .SEED(SEED_A))
    dut_a (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_a), .out_valid(va), .out_data(oa));
  conv1d_layer #(.C(2), .K(3), .F(4), .IN_W(2), .MID_W(3), .OUT_W(2), .SEPARATED(1'b0),
                 .STRIDE(2), .SHIFT_DW(1), .SHIFT_PW(2), .SEED(SEED_B))
    dut_b (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_b), .out_valid(vb), .out_data(ob));

  int ck5, fl5, ck10, fl10;
  logic done5, done10;
  tb_conv_sep_check #(.C(2), .K(5),  .IN_W(2), .SEED(321)) chk_k5
    (.clk(clk), .rst_n(rst_n), .checks(ck5), .failures(fl5), .done(done5));
  tb_conv_sep_check #(.C(2), .K(10), .IN_W(1), .SEED(654)) chk_k10
    (.clk(clk), .rst_n(rst_n), .checks(ck10), .failures(fl10), .done(done10));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitors
  always @(posedge clk) if (rst_n) begin
    if (va) begin
      checks++;
      if (qa.size() == 0) begin failures++; $display("A: unexpected output"); end
      else begin
        exp_t e;
        e = qa.pop_front();
        if (e.t != cycle) begin failures++; $display("A: output at %0d, expected %0d", cycle, e.t); end
        for (int f = 0; f < 4; f++) if (oa[f] !== 2'(e.y[f])) begin
          failures++; $display("A: cyc %0d f%0d got %0d exp %0d", cycle, f, oa[f], e.y[f]);
        end
      end
    end
    if (vb) begin
      checks++;
      if (qb.size() == 0) begin failures++; $display("B: unexpected output"); end
      else begin
        exp_t e;
        e = qb.pop_front();
        if (e.t != cycle) begin failures++; $display("B: output at %0d, expected %0d", cycle, e.t); end
        for (int f = 0; f < 4; f++) if (ob[f] !== 2'(e.y[f])) begin
          failures++; $display("B: cyc %0d f%0d got %0d exp %0d", cycle, f, ob[f], e.y[f]);
        end
      end
    end
  end

  initial begin
    int x[];
    exp_t e;
    for (int t = 0; t < 3; t++) begin
      for (int c = 0; c < 4; c++) ha[t][c] = 0;
      for (int c = 0; c < 2; c++) hb[t][c] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 800; n++) begin
      @(posedge clk);
      in_valid <= ($urandom % 4) != 0;
      for (int c = 0; c < 4; c++) in_a[c] <= 2'($urandom);
      for (int c = 0; c < 2; c++) in_b[c] <= 2'($urandom);
      #1;
      if (in_valid) begin
        for (int t = 2; t > 0; t--) begin
          for (int c = 0; c < 4; c++) ha[t][c] = ha[t-1][c];
          for (int c = 0; c < 2; c++) hb[t][c] = hb[t-1][c];
        end
        for (int c = 0; c < 4; c++) ha[0][c] = in_a[c];
        for (int c = 0; c < 2; c++) hb[0][c] = in_b[c];
        // separable: x[c*3 + t]
        x = new[12];
        for (int c = 0; c < 4; c++) for (int t = 0; t < 3; t++) x[c*3+t] = ha[t][c];
        e.t = cycle + 2;
        for (int f = 0; f < 4; f++)
          e.y[f] = ref_sep(lutnn_pkg::child_seed(SEED_A, f), 4, 3, 3, 2, 1, 3, x);
        qa.push_back(e);
        nb++;
        if (nb % 2 == 0) begin
          x = new[6];
          for (int c = 0; c < 2; c++) for (int t = 0; t < 3; t++) x[c*3+t] = hb[t][c];
          for (int f = 0; f < 4; f++)
            e.y[f] = ref_neuron(lutnn_pkg::child_seed(SEED_B, f), 6, 2, 2, x);
          qb.push_back(e);
        end
      end
    end
    @(posedge clk) in_valid <= 0;
    repeat (5) @(posedge clk);
    wait (done5 && done10);
    checks += ck5 + ck10;
    failures += fl5 + fl10;
    checks++;
    if (qa.size() != 0 || qb.size() != 0) begin
      failures++; $display("missing outputs: %0d %0d", qa.size(), qb.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
