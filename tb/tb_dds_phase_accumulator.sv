// tb_dds_phase_accumulator: checks that dds_phase_accumulator produces the
// eight consecutive sample phases acc + k*dF on every core-cycle enable,
// wraps modulo 2^N, and changes slope without a phase jump when the step
// changes. The reference keeps its own accumulator. Also checked: the
// outputs hold between enables, and the wrap of the accumulator is seen.
module tb_dds_phase_accumulator;
  localparam int unsigned CORES = 8, PHASE_W = 28;
  localparam longint unsigned MASK = (64'd1 << PHASE_W) - 1;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [PHASE_W-1:0] step = '0;
  logic [PHASE_W-1:0] offset [CORES];
  logic [PHASE_W-1:0] phase  [CORES];
  int checks = 0, failures = 0, wraps = 0;
  longint unsigned acc_ref = 0;

  dds_phase_accumulator dut (.clk, .rst_n, .ce, .step, .offset, .phase);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_ftw(longint unsigned d);
    step <= PHASE_W'(d * CORES);
    for (int k = 0; k < CORES; k++) offset[k] <= PHASE_W'(d * k);
  endtask

  task automatic run(longint unsigned d, int n);
    logic [PHASE_W-1:0] hold0;
    set_ftw(d);
    for (int i = 0; i < n; i++) begin
      ce <= 1'b1;
      @(posedge clk);
      ce <= 1'b0;
      #0.1;
      for (int k = 0; k < CORES; k++) begin
        checks++;
        if (phase[k] !== PHASE_W'((acc_ref + d * k) & MASK)) begin
          failures++;
          if (failures < 10) $display("FAIL phase[%0d]=%0d expected %0d", k, phase[k], (acc_ref + d * k) & MASK);
        end
      end
      if (acc_ref + d * CORES > MASK) wraps++;
      acc_ref = (acc_ref + d * CORES) & MASK;
      // outputs hold while ce is low
      hold0 = phase[0];
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #0.1;
      checks++;
      if (phase[0] !== hold0) begin
        failures++;
        $display("FAIL phase changed without enable");
      end
    end
  endtask

  initial begin
    set_ftw(0);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run(8589934, 600);        // 64 MHz at 2 GSPS: wraps every ~31 cycles
    run(100663296, 50);       // 750 MHz
    run(13421, 50);           // 100 kHz
    for (int j = 0; j < 40; j++) run(longint'($urandom) & MASK, $urandom_range(1, 40));
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL accumulator never wrapped");
    end
    $display("accumulator wraps: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
