// tb_sep_neuron -- self-checking test of sep_neuron
// The default neuron (two channels, three taps, 2-bit inputs: two 6-to-3
// cells into a 6-to-2 cell) is read at all 4096 input states and compared
// with the separable neuron evaluated directly.
module tb_sep_neuron;
  import tb_ref_pkg::*;
  localparam int unsigned SEED = 4242;

  logic [11:0] x;
  logic [1:0]  y;
  int checks = 0, failures = 0;
  int xv[];
  int hist[4];

  sep_neuron #(.GROUPS(2), .TAPS(3), .IN_W(2), .MID_W(3), .OUT_W(2),
               .SHIFT_DW(1), .SHIFT_PW(2), .SEED(SEED)) dut (.x(x), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    xv = new[6];
    for (int k = 0; k < 4; k++) hist[k] = 0;
    for (int a = 0; a < 4096; a++) begin
      x = 12'(a);
      #1;
      for (int i = 0; i < 6; i++) xv[i] = (a >> (2*i)) & 3;
      e = ref_sep(SEED, 2, 3, 3, 2, 1, 2, xv);
      hist[e]++;
      checks++;
      if (y !== 2'(e)) begin
        failures++;
        if (failures < 10) $display("a=%0d got %0d exp %0d", a, y, e);
      end
    end
    $display("output histogram %0d %0d %0d %0d", hist[0], hist[1], hist[2], hist[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
