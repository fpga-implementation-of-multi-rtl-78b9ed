// tb_dds_sine_lut: checks every entry of the sine table of dds_sine_lut
// against round(sin(2*pi*a/1024) * 8191), reached through full 28-bit phases
// with random low bits, and checks the one-enable read latency and that the
// output holds while the enable is low.
module tb_dds_sine_lut;
  import dds_tb_pkg::*;
  localparam int unsigned PHASE_W = 28, LUT_AW = 10, AMP_W = 14;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [PHASE_W-1:0] phase = '0;
  logic signed [AMP_W-1:0] amp;
  int checks = 0, failures = 0;

  dds_sine_lut dut (.clk, .rst_n, .ce, .phase, .amp);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic look(longint unsigned p);
    int e;
    e = ref_sine(p, PHASE_W, LUT_AW, AMP_W);
    phase <= PHASE_W'(p);
    ce    <= 1'b0;
    @(posedge clk);
    ce <= 1'b1;
    @(posedge clk);
    ce <= 1'b0;
    phase <= PHASE_W'($urandom);
    #0.1;
    checks++;
    if (int'(amp) != e) begin
      failures++;
      if (failures < 10) $display("FAIL phase=%h amp=%0d expected %0d", p, amp, e);
    end
    @(posedge clk);
    #0.1;
    checks++;
    if (int'(amp) != e) begin
      failures++;
      $display("FAIL output did not hold without enable");
    end
  endtask

  initial begin
    ce <= 1'b1;
    phase <= 28'h4000000;
    repeat (2) @(posedge clk);
    #0.1;
    checks++;
    if (amp !== '0) begin
      failures++;
      $display("FAIL reset did not clear the output");
    end
    rst_n <= 1'b1;
    for (int a = 0; a < (1 << LUT_AW); a++)
      look((longint'(a) << (PHASE_W - LUT_AW)) | longint'($urandom_range(0, (1 << (PHASE_W - LUT_AW)) - 1)));
    // spot values: quarter points of the cycle
    checks++;
    if (ref_sine(64'h4000000, PHASE_W, LUT_AW, AMP_W) != 8191) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
