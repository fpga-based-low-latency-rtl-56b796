// tb_pool1d -- self-checking test of pool1d
// A max-pooling and an average-pooling instance (3 channels, 2-bit values,
// window 4) get the same random stream with random gaps. The model collects
// each window of 4 valid inputs and predicts the maximum, resp. the rounded-
// down mean, two cycles after the window's last input; any extra or missing
// output counts as a failure, so the 4:1 rate reduction is checked too.
module tb_pool1d;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] din [3];
  logic vm, va;
  logic [1:0] om [3];
  logic [1:0] oa [3];
  int checks = 0, failures = 0, cycle = 0, nin = 0, nout = 0;

  typedef struct { int t; int mx[3]; int av[3]; } exp_t;
  exp_t q[$];
  int win [4][3];

  pool1d #(.CH(3), .W(2), .P(4), .MODE(lutnn_pkg::POOL_MAX)) dut_max
    (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(din), .out_valid(vm), .out_data(om));
  pool1d #(.CH(3), .W(2), .P(4), .MODE(lutnn_pkg::POOL_AVG)) dut_avg
    (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(din), .out_valid(va), .out_data(oa));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (vm != va) begin failures++; $display("valid mismatch between modes"); end
    if (vm) begin
      exp_t e;
      checks++;
      nout++;
      if (q.size() == 0) begin failures++; $display("unexpected output at %0d", cycle); end
      else begin
        e = q.pop_front();
        if (e.t != cycle) begin failures++; $display("output at %0d, expected %0d", cycle, e.t); end
        for (int c = 0; c < 3; c++) begin
          if (om[c] !== 2'(e.mx[c])) begin failures++; $display("max c%0d got %0d exp %0d", c, om[c], e.mx[c]); end
          if (oa[c] !== 2'(e.av[c])) begin failures++; $display("avg c%0d got %0d exp %0d", c, oa[c], e.av[c]); end
        end
      end
    end
  end

  initial begin
    exp_t e;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 1000; n++) begin
      @(posedge clk);
      in_valid <= ($urandom % 3) != 0;
      for (int c = 0; c < 3; c++) din[c] <= 2'($urandom);
      #1;
      if (in_valid) begin
        for (int c = 0; c < 3; c++) win[nin % 4][c] = din[c];
        nin++;
        if (nin % 4 == 0) begin
          e.t = cycle + 2;
          for (int c = 0; c < 3; c++) begin
            int s, m;
            s = 0; m = 0;
            for (int k = 0; k < 4; k++) begin
              s += win[k][c];
              if (win[k][c] > m) m = win[k][c];
            end
            e.mx[c] = m;
            e.av[c] = s / 4;
          end
          q.push_back(e);
        end
      end
    end
    @(posedge clk) in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0 || nout != nin / 4) begin
      failures++; $display("outputs %0d for %0d inputs", nout, nin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
