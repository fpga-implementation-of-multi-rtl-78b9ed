// tb_dds_sine_lut_module: checks the LUT bank, the counter and the four
// multiplexers of dds_sine_lut_module. The enables follow the design's
// rates: ce_fast every second clock, ce_slow every eighth, on a ce_fast
// cycle. Random phase words are applied once per core cycle. Checked:
// the parallel amplitudes and delayed phases after each core cycle, and that
// DB0/DB1 (MUX1/MUX3) and Phase_DB0/Phase_DB1 (MUX2/MUX4) carry samples
// 1-2, 3-4, 5-6, 7-8 of each word at counts 0, 1, 2, 3 on consecutive
// ce_fast ticks, i.e. exactly four pairs per core cycle.
module tb_dds_sine_lut_module;
  import dds_tb_pkg::*;
  localparam int unsigned CORES = 8, PHASE_W = 28, LUT_AW = 10, AMP_W = 14;

  logic clk = 1'b0, rst_n = 1'b0, ce_slow = 1'b0, ce_fast = 1'b0;
  logic [PHASE_W-1:0]      phase     [CORES];
  logic signed [AMP_W-1:0] sine_par  [CORES];
  logic [PHASE_W-1:0]      phase_par [CORES];
  logic signed [AMP_W-1:0] db0, db1;
  logic [PHASE_W-1:0]      phase_db0, phase_db1;
  logic [1:0]              count;
  int checks = 0, failures = 0;
  int counts_seen [4] = '{0, 0, 0, 0};

  typedef struct { int amp; logic [PHASE_W-1:0] ph; int cnt; } sample_t;
  sample_t q [$];

  dds_sine_lut_module dut (.clk, .rst_n, .ce_slow, .ce_fast, .phase, .sine_par, .phase_par,
                           .db0, .db1, .phase_db0, .phase_db1, .count);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endtask

  initial begin
    int cyc;
    logic [PHASE_W-1:0] word [CORES];
    for (int k = 0; k < CORES; k++) phase[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (cyc = 0; cyc < 8 * 3000; cyc++) begin
      // enables for the coming edge
      ce_fast <= (cyc % 2) == 1;
      ce_slow <= (cyc % 8) == 7;
      if (cyc % 8 == 0)
        for (int k = 0; k < CORES; k++) phase[k] <= PHASE_W'($urandom);
      @(posedge clk);
      #0.1;
      if (ce_fast) begin
        if (q.size() >= 2) begin
          sample_t a, b;
          a = q.pop_front();
          b = q.pop_front();
          checks++;
          if (int'(db0) != a.amp || phase_db0 !== a.ph) fail($sformatf("DB0 %0d/%h expected %0d/%h", db0, phase_db0, a.amp, a.ph));
          checks++;
          if (int'(db1) != b.amp || phase_db1 !== b.ph) fail($sformatf("DB1 %0d/%h expected %0d/%h", db1, phase_db1, b.amp, b.ph));
          counts_seen[a.cnt]++;
        end
      end
      if (ce_slow) begin
        for (int k = 0; k < CORES; k++) word[k] = phase[k];
        for (int k = 0; k < CORES; k++) begin
          sample_t s;
          s.amp = ref_sine(64'(word[k]), PHASE_W, LUT_AW, AMP_W);
          s.ph  = word[k];
          s.cnt = k / 2;
          q.push_back(s);
          checks++;
          if (int'(sine_par[k]) != s.amp || phase_par[k] !== s.ph) fail($sformatf("lane %0d: %0d expected %0d", k, sine_par[k], s.amp));
        end
        checks++;
        if (count !== 2'd0) fail("counter did not restart at the core-cycle boundary");
      end
      if (ce_fast && !ce_slow && q.size() > 0) begin
        checks++;
        if (count !== 2'(q[0].cnt)) fail($sformatf("count %0d expected %0d", count, q[0].cnt));
      end
    end
    ce_fast <= 1'b0;
    ce_slow <= 1'b0;
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (counts_seen[c] == 0) fail($sformatf("count %0d never used", c));
    end
    $display("pairs sent at counts 0..3: %0d %0d %0d %0d", counts_seen[0], counts_seen[1], counts_seen[2], counts_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
