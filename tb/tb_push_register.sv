// tb_push_register -- self-checking test of push_register
// Pushes random values with random gaps and compares every tap, every cycle,
// with a software history; also checks the reset to zero.
module tb_push_register;
  localparam int W = 5, D = 4;
  logic clk = 0, rst_n = 0, push = 0;
  logic [W-1:0] din = '0;
  logic [W-1:0] taps [D];
  int checks = 0, failures = 0;
  int hist [D];

  push_register #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < D; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      push = ($urandom % 3) != 0;
      din  = W'($urandom);
      @(posedge clk);
      if (push) begin
        for (int k = D-1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = din;
      end
      #1;
      for (int k = 0; k < D; k++) begin
        checks++;
        if (taps[k] !== W'(hist[k])) begin
          failures++;
          if (failures < 10) $display("mismatch n=%0d tap%0d got %0d exp %0d", n, k, taps[k], hist[k]);
        end
      end
    end
    rst_n = 0; push = 0;
    @(posedge clk); #1;
    for (int k = 0; k < D; k++) begin
      checks++;
      if (taps[k] !== '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
