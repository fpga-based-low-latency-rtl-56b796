// tb_lutnn_ecg_top -- end-to-end test of the ECG artefact detector
//
// Runs the top at its default size on two synthetic stereo ECG records of
// 5575 samples each (500 Hz, signed 16 bit), with a synchronous reset between
// them. Each record is a baseline wander plus a QRS-like spike every 416
// samples; some stretches carry artefacts (large random noise, clipping at
// full scale). Input gaps (in_valid low) are inserted at random.
//
// The behavioural model (tb_ecg_model_pkg) predicts every decision, its
// scores and the cycle it must appear in: 19 cycles after the 64th sample of
// its block. Mechanisms that must each happen at least once: ReLU clipping to
// zero, output saturation, outputs of all three pooling stages, input gaps,
// the reset between records, and both class decisions. The number of
// decisions must be exactly one per 64 samples of each record (three 4:1
// stages).
module tb_lutnn_ecg_top;
  import tb_ecg_model_pkg::*;

  localparam int REC_LEN = 5575;
  localparam int N_REC   = 2;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] smp [2];
  logic       ov, cls;
  logic [1:0] sc [2];
  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_gap = 0, n_reset = 0, n_cls0 = 0, n_cls1 = 0, n_dec = 0;
  ecg_model m;

  lutnn_ecg_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sample(smp),
                     .out_valid(ov), .out_class(cls), .out_score(sc));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (60000) @(posedge clk);
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
      if (e.t != cycle) begin failures++; $display("decision at %0d, expected %0d", cycle, e.t); end
      if (cls !== 1'(e.c) || sc[0] !== 2'(e.s[0]) || sc[1] !== 2'(e.s[1])) begin
        failures++;
        if (failures < 10)
          $display("cyc %0d got c%0d %0d/%0d exp c%0d %0d/%0d", cycle, cls, sc[0], sc[1], e.c, e.s[0], e.s[1]);
      end
      if (e.c == 1) n_cls1++; else n_cls0++;
    end
  end

  task automatic check_count(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never seen: %s", what); end
  endtask

  initial begin
    int a, b, n_in;
    bit art;
    m = new();
    n_in = 0;
    smp[0] = '0; smp[1] = '0;
    for (int rec = 0; rec < N_REC; rec++) begin
      rst_n <= 0;
      in_valid <= 0;
      m.reset();
      n_reset++;
      repeat (3) @(posedge clk);
      rst_n <= 1;
      for (int n = 0; n < REC_LEN; ) begin
        @(posedge clk);
        if (($urandom % 8) == 0) begin
          in_valid <= 0;
          n_gap++;
          continue;
        end
        art = ((n / 700) % 3 == 2);
        a = ecg_sample(rec, 0, n, art);
        b = ecg_sample(rec, 1, n, art);
        smp[0] <= 16'(a);
        smp[1] <= 16'(b);
        in_valid <= 1;
        #1;
        m.step(a, b, cycle);
        n_in++;
        n++;
      end
      @(posedge clk) in_valid <= 0;
      repeat (LAT + 5) @(posedge clk);
      checks++;
      if (m.q.size() != 0) begin
        failures++; $display("record %0d: %0d decisions missing", rec, m.q.size()); m.q.delete();
      end
    end
    checks++;
    if (n_dec != N_REC * (REC_LEN / 64)) begin
      failures++; $display("%0d decisions, expected %0d", n_dec, N_REC * (REC_LEN / 64));
    end
    $display("samples %0d gaps %0d resets %0d pooled %0d/%0d/%0d relu-zero %0d saturated %0d class0 %0d class1 %0d",
             n_in, n_gap, n_reset, m.n_pool[0], m.n_pool[1], m.n_pool[2], m.n_zero, m.n_sat, n_cls0, n_cls1);
    for (int s = 0; s < 3; s++) check_count($sformatf("pooling stage %0d output", s), m.n_pool[s]);
    check_count("ReLU clipping", m.n_zero);
    check_count("saturation", m.n_sat);
    check_count("input gap", n_gap);
    check_count("reset between records", n_reset - 1);
    check_count("class 0 decision", n_cls0);
    check_count("class 1 decision", n_cls1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
