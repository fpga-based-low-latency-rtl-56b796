// tb_input_quantizer -- self-checking test of input_quantizer
// Drives the threshold values, their neighbours, the extremes and random
// samples on both channels and checks the 2-bit codes one cycle later
// (code = number of the thresholds -16384, 0, 16384 that the sample reaches).
module tb_input_quantizer;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] smp [2];
  logic ov;
  logic [1:0] code [2];
  int checks = 0, failures = 0;

  input_quantizer #(.CH(2), .SAMPLE_W(16), .OUT_W(2)) dut
    (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sample(smp), .out_valid(ov), .out_code(code));

  always #5 clk = ~clk;

  function automatic int ref_code(int s);
    int c;
    c = 0;
    if (s >= -16384) c++;
    if (s >= 0)      c++;
    if (s >= 16384)  c++;
    return c;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vals[$];
    int a, b;
    vals = '{-32768, -16385, -16384, -16383, -1, 0, 1, 16383, 16384, 16385, 32767};
    for (int i = 0; i < 300; i++) vals.push_back(int'($signed(16'($urandom))));
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < vals.size(); i++) begin
      a = vals[i];
      b = vals[vals.size() - 1 - i];
      smp[0] <= 16'(a);
      smp[1] <= 16'(b);
      in_valid <= (i % 5) != 4;
      @(posedge clk);
      #1;
      checks++;
      if (ov !== ((i % 5) != 4)) begin failures++; $display("valid wrong at %0d", i); end
      if (ov && (code[0] !== 2'(ref_code(a)) || code[1] !== 2'(ref_code(b)))) begin
        failures++;
        $display("sample %0d/%0d -> %0d/%0d", a, b, code[0], code[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
