// tb_lut_cell -- self-checking test of lut_cell
// Loads a table whose entry a is (5a + 3) mod 8 and reads every address.
module tb_lut_cell;
  localparam int N = 6, M = 3;
  function automatic logic [(2**N)*M-1:0] make_table();
    logic [(2**N)*M-1:0] t;
    for (int a = 0; a < 2**N; a++) t[a*M +: M] = M'((5*a + 3) % 8);
    return t;
  endfunction
  localparam logic [(2**N)*M-1:0] TBL = make_table();

  logic [N-1:0] addr;
  logic [M-1:0] dout;
  int checks = 0, failures = 0;

  lut_cell #(.N_IN(N), .N_OUT(M), .TABLE(TBL)) dut (.addr(addr), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**N; a++) begin
      addr = N'(a);
      #1;
      checks++;
      if (dout !== M'((5*a + 3) % 8)) begin
        failures++;
        $display("addr %0d got %0d", a, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
