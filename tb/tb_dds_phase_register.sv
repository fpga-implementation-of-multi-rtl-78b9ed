// tb_dds_phase_register: checks the frequency-to-tuning-word conversion and
// the phase offsets of dds_phase_register at its default sizes.
// Frequencies: the 64 MHz example (dF must be 8589934), the 100 kHz and
// 750 MHz ends of the range, exact-boundary values, and random ones. The
// enable is irregular; each result is checked exactly 3 enables after the
// frequency is applied, and must not have appeared after 2.
module tb_dds_phase_register;
  import dds_tb_pkg::*;
  localparam int unsigned CORES = 8, PHASE_W = 28, FREQ_W = 30;
  localparam longint unsigned FS = 64'd2_000_000_000;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [FREQ_W-1:0]  freq_hz = '0;
  logic [PHASE_W-1:0] ftw, step;
  logic [PHASE_W-1:0] offset [CORES];
  int checks = 0, failures = 0;

  dds_phase_register dut (.clk, .rst_n, .ce, .freq_hz, .ftw, .step, .offset);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick_ce();
    // some idle cycles, then one enabled cycle
    repeat ($urandom_range(0, 3)) @(posedge clk);
    ce <= 1'b1;
    @(posedge clk);
    ce <= 1'b0;
    #0.1;
  endtask

  task automatic check(longint unsigned f);
    longint unsigned e;
    e = ref_ftw(f, PHASE_W, FS) & ((64'd1 << PHASE_W) - 1);
    freq_hz <= FREQ_W'(f);
    tick_ce();
    tick_ce();
    freq_hz <= FREQ_W'($urandom);   // only the sampled value may matter
    tick_ce();
    checks++;
    if (ftw !== PHASE_W'(e)) begin
      failures++;
      $display("FAIL f=%0d ftw=%0d expected %0d", f, ftw, e);
    end
    checks++;
    if (step !== PHASE_W'(e * CORES)) begin
      failures++;
      $display("FAIL f=%0d step=%0d expected %0d", f, step, PHASE_W'(e * CORES));
    end
    for (int k = 0; k < CORES; k++) begin
      checks++;
      if (offset[k] !== PHASE_W'(e * k)) begin
        failures++;
        $display("FAIL f=%0d offset[%0d]=%0d expected %0d", f, k, offset[k], PHASE_W'(e * k));
      end
    end
  endtask

  initial begin
    longint unsigned f;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(64'd64_000_000);
    checks++;
    if (ftw !== 28'd8589934) begin
      failures++;
      $display("FAIL 64 MHz tuning word %0d", ftw);
    end
    check(64'd100_000);
    check(64'd750_000_000);
    check(64'd1);
    check(64'd7);
    check(64'd8);
    check(64'd1_953_125);       // quotient exactly an integer
    check(64'd1_953_124);       // fraction just below one
    check(64'd999_999_999);
    check(64'(2**FREQ_W - 1));
    // latency: a change is not visible after two enables
    freq_hz <= 30'd64_000_000; tick_ce(); tick_ce(); tick_ce();
    freq_hz <= 30'd500_000_000; tick_ce(); tick_ce();
    checks++;
    if (ftw !== 28'd8589934) begin
      failures++;
      $display("FAIL result appeared before the third enable");
    end
    tick_ce();
    checks++;
    if (ftw !== PHASE_W'(ref_ftw(500_000_000, PHASE_W, FS))) begin
      failures++;
      $display("FAIL result missing after the third enable");
    end
    for (int i = 0; i < 2000; i++) begin
      f = longint'($urandom_range(0, 2**FREQ_W - 1));
      check(f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
