// tb_lut_neuron -- self-checking test of lut_neuron
// Two neurons, a 6-to-3 cell (3 two-bit inputs) and a 12-to-2 cell (6 two-bit
// inputs), are read at every input state and compared with the neuron
// equation evaluated directly. A third 6-to-2 neuron uses a non-uniform input
// codebook (codes worth -2, 0, 3, 9) and non-uniform output thresholds (2, 7,
// 20). Also counts that the ReLU clips and the output saturates at least once
// each.
module tb_lut_neuron;
  import tb_ref_pkg::*;
  localparam int unsigned SEED_A = 77, SEED_B = 1234, SEED_C = 31;
  localparam lutnn_pkg::codebook_t CB = {32'sd0, 32'sd0, 32'sd0, 32'sd0, 32'sd0, 32'sd0, 32'sd0, 32'sd0,
                                         32'sd0, 32'sd0, 32'sd0, 32'sd0, 32'sd9, 32'sd3, 32'sd0, -32'sd2};
  localparam lutnn_pkg::thresh_t   TH = {32'sd99, 32'sd99, 32'sd99, 32'sd99, 32'sd99, 32'sd99, 32'sd99,
                                         32'sd99, 32'sd99, 32'sd99, 32'sd99, 32'sd99, 32'sd20, 32'sd7, 32'sd2};
  logic [5:0] xc;
  logic [1:0] yc;
  int cbv[] = '{-2, 0, 3, 9};
  int thv[] = '{2, 7, 20};
  int hist_c[4];

  logic [5:0]  xa;
  logic [2:0]  ya;
  logic [11:0] xb;
  logic [1:0]  yb;
  int checks = 0, failures = 0, zeros = 0, sats = 0;
  int x[];

  lut_neuron #(.N_INPUTS(3), .IN_W(2), .OUT_W(3), .SHIFT(1), .SEED(SEED_A)) dut_a (.x(xa), .y(ya));
  lut_neuron #(.N_INPUTS(6), .IN_W(2), .OUT_W(2), .SHIFT(2), .SEED(SEED_B)) dut_b (.x(xb), .y(yb));
  lut_neuron #(.N_INPUTS(3), .IN_W(2), .OUT_W(2), .SEED(SEED_C), .IN_CODEBOOK(CB), .OUT_THRESH(TH))
    dut_c (.x(xc), .y(yc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    x = new[6];
    for (int a = 0; a < 64; a++) begin
      xa = 6'(a);
      #1;
      for (int i = 0; i < 3; i++) x[i] = (a >> (2*i)) & 3;
      e = ref_neuron(SEED_A, 3, 3, 1, x);
      checks++;
      if (ya !== 3'(e)) begin failures++; $display("A a=%0d got %0d exp %0d", a, ya, e); end
    end
    for (int a = 0; a < 4096; a++) begin
      xb = 12'(a);
      #1;
      for (int i = 0; i < 6; i++) x[i] = (a >> (2*i)) & 3;
      e = ref_neuron(SEED_B, 6, 2, 2, x);
      if (e == 0) zeros++;
      if (e == 3) sats++;
      checks++;
      if (yb !== 2'(e)) begin
        failures++;
        if (failures < 10) $display("B a=%0d got %0d exp %0d", a, yb, e);
      end
    end
    for (int k = 0; k < 4; k++) hist_c[k] = 0;
    for (int a = 0; a < 64; a++) begin
      xc = 6'(a);
      #1;
      for (int i = 0; i < 3; i++) x[i] = (a >> (2*i)) & 3;
      e = ref_neuron_cb(SEED_C, 3, 2, cbv, thv, x);
      hist_c[e]++;
      checks++;
      if (yc !== 2'(e)) begin failures++; $display("C a=%0d got %0d exp %0d", a, yc, e); end
    end
    $display("codebook neuron output histogram %0d %0d %0d %0d", hist_c[0], hist_c[1], hist_c[2], hist_c[3]);
    checks++;
    if (zeros == 0 || sats == 0) begin
      failures++;
      $display("ReLU clip seen %0d times, saturation %0d times", zeros, sats);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
