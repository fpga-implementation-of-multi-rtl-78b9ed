// dds_phase_accumulator: the multi-phase accumulator with CORES adders.
//
// One accumulator register advances by step = CORES*dF on every ce (250 MHz
// core cycle) and wraps modulo 2^N, the phase-wheel overflow. CORES adders
// add the phase offsets k*dF to the accumulated phase, so one core cycle
// yields CORES consecutive sample phases: phase[k] = acc + k*dF. At
// 8 x 250 MHz this is a 2 GSPS phase stream, as from eight DDS cores
// running in parallel. This structure is the design's.
//
// Timing: phase[] is registered; on each ce it takes acc + offset[k] using
// the accumulator value before that ce's update. With constant dF and a
// reset accumulator, the n-th ce after reset (n = 0, 1, ...) presents the
// phases of samples 8n..8n+7, i.e. (8n+k)*dF mod 2^N. A new step changes the
// slope without disturbing the phase (phase-continuous frequency change).
module dds_phase_accumulator #(
  parameter int unsigned CORES   = dds_pkg::CORES,
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic [PHASE_W-1:0] step,
  input  logic [PHASE_W-1:0] offset [CORES],
  output logic [PHASE_W-1:0] phase  [CORES]
);
  logic [PHASE_W-1:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      for (int k = 0; k < CORES; k++) phase[k] <= '0;
    end else if (ce) begin
      acc <= acc + step;
      for (int k = 0; k < CORES; k++) phase[k] <= acc + offset[k];
    end
  end
endmodule
