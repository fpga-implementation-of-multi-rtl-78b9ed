// tb_multi_dds_top: end-to-end test of the 8-core DDS at its default sizes
// (8 lanes, 28-bit phase, 2 GSPS), taking it through frequency settings
// that the design is meant for: the 64 MHz MRI resonance, the 750 MHz and
// 100 kHz ends of its range, random frequencies, and back.
// Checked, independently of the RTL:
//  - the tuning word is floor(f*2^28/2e9) (8589934 for 64 MHz) and appears
//    exactly 3 core cycles after the frequency is applied;
//  - on every clock the 2 GSPS stream carries a new sample: each phase step
//    is the tuning word in force, and a frequency change switches the step
//    once, with no phase jump;
//  - every SINE sample equals the sine table entry of its PHASE;
//  - the eight parallel phases of each core cycle are consecutive;
//  - over each setting the number of phase-wheel overflows (output cycles)
//    matches samples*dF/2^28, i.e. the output frequency is right.
// Mechanisms counted, each must occur: accumulator overflow, frequency
// change, each mux count 0..3, both halves of the DAC switch.
module tb_multi_dds_top;
  import dds_tb_pkg::*;
  localparam int unsigned CORES = 8, PHASE_W = 28, LUT_AW = 10, AMP_W = 14, FREQ_W = 30;
  localparam longint unsigned FS = 64'd2_000_000_000;
  localparam longint unsigned MASK = (64'd1 << PHASE_W) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [FREQ_W-1:0]       freq_hz = '0;
  logic                    ce_slow, ce_fast;
  logic [PHASE_W-1:0]      ftw;
  logic [PHASE_W-1:0]      par_phase [CORES];
  logic signed [AMP_W-1:0] par_sine  [CORES];
  logic signed [AMP_W-1:0] db0, db1, sine;
  logic [PHASE_W-1:0]      phase_db0, phase_db1, phase;
  logic [1:0]              count;

  int checks = 0, failures = 0;
  int n_wrap = 0, n_change = 0, n_half0 = 0, n_half1 = 0;
  int n_count [4] = '{0, 0, 0, 0};

  // stream checker state
  longint unsigned cur_step = 0, next_step = 0;
  logic [PHASE_W-1:0] prev_phase = '0;
  bit  stream_on = 0;
  int  seg_samples = 0, seg_wraps = 0;

  multi_dds_top dut (.clk, .rst_n, .freq_hz, .ce_slow, .ce_fast, .ftw, .par_phase, .par_sine,
                     .db0, .db1, .phase_db0, .phase_db1, .sine, .phase, .count);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0t %s", $time, msg);
  endtask

  // per-clock check of the 2 GSPS output stream
  always @(posedge clk) begin
    #0.2;
    if (rst_n && stream_on) begin
      longint unsigned d;
      d = (longint'(phase) - longint'(prev_phase)) & MASK;
      checks++;
      if (d == cur_step) begin
      end else if (d == next_step) begin
        cur_step = next_step;
      end else begin
        fail($sformatf("phase step %0d, expected %0d or %0d", d, cur_step, next_step));
      end
      if (longint'(prev_phase) + d > MASK) begin
        n_wrap++;
        seg_wraps++;
      end
      seg_samples++;
      checks++;
      if (int'(sine) != ref_sine(64'(phase), PHASE_W, LUT_AW, AMP_W))
        fail($sformatf("sine %0d for phase %h", sine, phase));
    end
    prev_phase = phase;
    if (rst_n) begin
      if (ce_fast) n_half0++; else n_half1++;
      if (ce_fast) n_count[count]++;
      if (ce_slow) begin
        for (int k = 1; k < CORES; k++) begin
          checks++;
          if (((longint'(par_phase[k]) - longint'(par_phase[k-1])) & MASK) != (longint'(par_phase[1]) - longint'(par_phase[0]) & MASK))
            fail("parallel phases not consecutive");
        end
      end
    end
  end

  // apply a frequency just after a core-cycle edge; check the tuning word
  // latency, then run n clocks and check the number of output cycles
  task automatic set_freq(longint unsigned f, int n);
    longint unsigned e;
    logic [PHASE_W-1:0] old;
    e = ref_ftw(f, PHASE_W, FS) & MASK;
    @(posedge clk iff ce_slow);
    old = ftw;
    freq_hz <= FREQ_W'(f);
    next_step = e;
    if (e != longint'(old)) n_change++;
    repeat (2) @(posedge clk iff ce_slow);
    #0.1;
    checks++;
    if (ftw !== old) fail("tuning word changed too early");
    @(posedge clk iff ce_slow);
    #0.1;
    checks++;
    if (ftw !== PHASE_W'(e)) fail($sformatf("ftw %0d for %0d Hz, expected %0d", ftw, f, e));
    // let the change reach the output, then measure a segment
    repeat (40) @(posedge clk);
    #0.3;
    checks++;
    if (cur_step != e) fail("output did not switch to the new frequency");
    seg_samples = 0;
    seg_wraps = 0;
    repeat (n) @(posedge clk);
    #0.3;
    begin
      longint unsigned lo, hi;
      lo = (longint'(seg_samples) * e) >> PHASE_W;
      hi = lo + 1;
      checks++;
      if (longint'(seg_wraps) < lo || longint'(seg_wraps) > hi)
        fail($sformatf("%0d Hz: %0d cycles in %0d samples, expected %0d..%0d", f, seg_wraps, seg_samples, lo, hi));
      $display("%0d Hz: dF=%0d, %0d output cycles in %0d samples at 2 GSPS", f, e, seg_wraps, seg_samples);
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    // the accumulator starts at 0 with a zero step until the first tuning word
    stream_on = 1;
    set_freq(64_000_000, 10000);
    checks++;
    if (ftw !== 28'd8589934) fail("64 MHz tuning word is not 8589934");
    set_freq(750_000_000, 3000);
    set_freq(100_000, 25000);
    for (int i = 0; i < 4; i++) set_freq(longint'($urandom_range(100_000, 750_000_000)), 3000);
    set_freq(64_000_000, 3000);

    checks++; if (n_wrap == 0)   fail("accumulator overflow never happened");
    checks++; if (n_change < 3)  fail("too few frequency changes");
    checks++; if (n_half0 == 0 || n_half1 == 0) fail("a DAC switch half never used");
    for (int c = 0; c < 4; c++) begin
      checks++; if (n_count[c] == 0) fail($sformatf("mux count %0d never used", c));
    end
    $display("overflows=%0d frequency_changes=%0d dac_halves=%0d/%0d mux_counts=%0d/%0d/%0d/%0d",
             n_wrap, n_change, n_half0, n_half1, n_count[0], n_count[1], n_count[2], n_count[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
