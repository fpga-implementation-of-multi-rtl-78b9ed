// tb_dds_dac_mock: drives dds_dac_mock the way the multiplexers do: a new
// random DB0/DB1 and Phase_DB0/Phase_DB1 pair on every ce_fast edge (one
// clock in two, 1 GSPS per path). Checks that SINE and PHASE carry DB0 of a
// pair one clock after it is loaded and DB1 one clock later, i.e. one new
// sample per clock (2 GSPS) in the order DB0, DB1.
module tb_dds_dac_mock;
  localparam int unsigned PHASE_W = 28, AMP_W = 14;

  logic clk = 1'b0, rst_n = 1'b0, ce_fast = 1'b0;
  logic signed [AMP_W-1:0] db0 = '0, db1 = '0, sine;
  logic [PHASE_W-1:0] phase_db0 = '0, phase_db1 = '0, phase;
  int checks = 0, failures = 0;
  logic signed [AMP_W-1:0] s0, s1;
  logic [PHASE_W-1:0] p0, p1;

  dds_dac_mock dut (.clk, .rst_n, .ce_fast, .db0, .db1, .phase_db0, .phase_db1, .sine, .phase);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n   <= 1'b1;
    ce_fast <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 5000; i++) begin
      // just after a ce_fast edge: the muxes present a new pair
      #0.1;
      s0 = AMP_W'($urandom); s1 = AMP_W'($urandom);
      p0 = PHASE_W'($urandom); p1 = PHASE_W'($urandom);
      db0 <= s0; db1 <= s1; phase_db0 <= p0; phase_db1 <= p1;
      ce_fast <= 1'b0;
      @(posedge clk);              // switch takes DB0
      ce_fast <= 1'b1;
      #0.1;
      checks++;
      if (sine !== s0 || phase !== p0) begin
        failures++;
        if (failures < 10) $display("FAIL first half: %0d/%h expected %0d/%h", sine, phase, s0, p0);
      end
      @(posedge clk);              // ce_fast edge: switch takes DB1
      #0.1;
      checks++;
      if (sine !== s1 || phase !== p1) begin
        failures++;
        if (failures < 10) $display("FAIL second half: %0d/%h expected %0d/%h", sine, phase, s1, p1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
