// tb_ecg_batch -- the full evaluation batch: 500 ECG records of 5575 samples
//
// Streams 500 synthetic stereo records (2 787 500 samples) through the top at
// its default size, one sample every clock with no gaps. Between records the
// input idles for 16 cycles, so the last decision of a record leaves the
// pipeline, and a one-cycle reset clears the windows. Every decision is
// checked against the behavioural model (value and cycle).
//
// Rate: the batch must take no more than 2 810 000 cycles, which at a 10 MHz
// clock is 0.281 s, i.e. about 10 million samples per second. With one sample
// per clock the design needs 500 x (5575 + 17) = 2 796 000 cycles.
module tb_ecg_batch;
  import tb_ecg_model_pkg::*;

  localparam int REC_LEN    = 5575;
  localparam int N_REC      = 500;
  localparam int IDLE       = 16;
  localparam longint BUDGET = 2810000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] smp [2];
  logic       ov, cls;
  logic [1:0] sc [2];
  int checks = 0, failures = 0, n_dec = 0, n_cls1 = 0;
  longint cycle = 0, t_start = 0, t_end = 0;
  ecg_model m;

  lutnn_ecg_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sample(smp),
                     .out_valid(ov), .out_class(cls), .out_score(sc));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ov) begin
    exp_t e;
    checks++;
    n_dec++;
    if (m.q.size() == 0) begin failures++; $display("unexpected decision at %0d", cycle); end
    else begin
      e = m.q.pop_front();
      if (e.t != cycle || cls !== 1'(e.c) || sc[0] !== 2'(e.s[0]) || sc[1] !== 2'(e.s[1])) begin
        failures++;
        if (failures < 10)
          $display("cyc %0d got c%0d %0d/%0d, exp cyc %0d c%0d %0d/%0d", cycle, cls, sc[0], sc[1],
                   e.t, e.c, e.s[0], e.s[1]);
      end
      if (e.c == 1) n_cls1++;
    end
  end

  initial begin
    int a, b;
    bit art;
    m = new();
    smp[0] = '0; smp[1] = '0;
    @(posedge clk);
    t_start = cycle;
    for (int rec = 0; rec < N_REC; rec++) begin
      rst_n <= 0;
      in_valid <= 0;
      m.reset();
      @(posedge clk);
      rst_n <= 1;
      for (int n = 0; n < REC_LEN; n++) begin
        art = (((n / 500) + rec) % 5 == 4);
        a = ecg_sample(rec, 0, n, art);
        b = ecg_sample(rec, 1, n, art);
        smp[0] <= 16'(a);
        smp[1] <= 16'(b);
        in_valid <= 1;
        #1;
        m.step(a, b, cycle);
        @(posedge clk);
      end
      in_valid <= 0;
      repeat (IDLE) @(posedge clk);
      checks++;
      if (m.q.size() != 0) begin
        failures++; $display("record %0d: %0d decisions missing", rec, m.q.size()); m.q.delete();
      end
    end
    t_end = cycle;
    checks++;
    if (n_dec != N_REC * (REC_LEN / 64)) begin
      failures++; $display("%0d decisions, expected %0d", n_dec, N_REC * (REC_LEN / 64));
    end
    checks++;
    if (t_end - t_start > BUDGET) begin
      failures++; $display("batch took %0d cycles, budget %0d", t_end - t_start, BUDGET);
    end
    $display("records %0d samples %0d cycles %0d (%.1f ms at 10 MHz) decisions %0d artefact %0d",
             N_REC, N_REC * REC_LEN, t_end - t_start, real'(t_end - t_start) / 1.0e4, n_dec, n_cls1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
