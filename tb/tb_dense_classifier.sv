// tb_dense_classifier -- self-checking test of dense_classifier
// Feeds a random 4-channel 2-bit stream with gaps. The model keeps the last
// four inputs, evaluates both class neurons directly, takes the argmax (ties
// to class 0) and predicts scores and decision two cycles after each input.
// Also requires both decisions to occur.
module tb_dense_classifier;
  import tb_ref_pkg::*;
  localparam int unsigned SEED = 900;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] din [4];
  logic ov;
  logic cls;
  logic [1:0] sc [2];
  int checks = 0, failures = 0, cycle = 0;
  int n_cls [2];

  typedef struct { int t; int s[2]; int c; } exp_t;
  exp_t q[$];
  int h [4][4];

  dense_classifier #(.C(4), .WIN(4), .IN_W(2), .MID_W(3), .SCORE_W(2), .N_CLASS(2),
                     .SHIFT_DW(1), .SHIFT_PW(3), .SEED(SEED)) dut
    (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(din), .out_valid(ov),
     .out_class(cls), .out_score(sc));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ov) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = q.pop_front();
      if (e.t != cycle) begin failures++; $display("output at %0d, expected %0d", cycle, e.t); end
      if (sc[0] !== 2'(e.s[0]) || sc[1] !== 2'(e.s[1]) || cls !== 1'(e.c)) begin
        failures++;
        $display("cyc %0d got %0d/%0d c%0d exp %0d/%0d c%0d", cycle, sc[0], sc[1], cls, e.s[0], e.s[1], e.c);
      end
      n_cls[e.c]++;
    end
  end

  initial begin
    exp_t e;
    int x[];
    x = new[16];
    n_cls[0] = 0; n_cls[1] = 0;
    for (int t = 0; t < 4; t++) for (int c = 0; c < 4; c++) h[t][c] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 1500; n++) begin
      @(posedge clk);
      in_valid <= ($urandom % 4) != 0;
      // slowly varying bias so that both classes get a chance
      for (int c = 0; c < 4; c++) din[c] <= ((n / 100) % 2 == 0) ? 2'($urandom % 2) : 2'(2 + $urandom % 2);
      #1;
      if (in_valid) begin
        for (int t = 3; t > 0; t--) for (int c = 0; c < 4; c++) h[t][c] = h[t-1][c];
        for (int c = 0; c < 4; c++) h[0][c] = din[c];
        for (int c = 0; c < 4; c++) for (int t = 0; t < 4; t++) x[c*4+t] = h[t][c];
        e.t = cycle + 2;
        for (int k = 0; k < 2; k++)
          e.s[k] = ref_sep(lutnn_pkg::child_seed(SEED, k), 4, 4, 3, 2, 1, 3, x);
        e.c = (e.s[1] > e.s[0]) ? 1 : 0;
        q.push_back(e);
      end
    end
    @(posedge clk) in_valid <= 0;
    repeat (5) @(posedge clk);
    $display("decisions: class0 %0d class1 %0d", n_cls[0], n_cls[1]);
    checks++;
    if (q.size() != 0 || n_cls[0] == 0 || n_cls[1] == 0) begin
      failures++; $display("missing outputs %0d or a class never decided", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
