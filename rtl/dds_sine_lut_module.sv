// dds_sine_lut_module: eight sine LUTs, a counter and four multiplexers.
//
// The CORES sample phases of a core cycle are converted to amplitudes in
// parallel by CORES sine LUTs, each running at the core rate (ce_slow,
// 250 MHz); the phases are delayed by the same one stage so each amplitude
// keeps its phase. A counter advancing on ce_fast (1 GHz) then walks through
// the samples two at a time: at count c, MUX1 sends sample 2c+1 (1st, 3rd,
// ...) to DB0 and MUX3 sample 2c+2 to DB1, while MUX2 and MUX4 send the
// matching phases to Phase_DB0 and Phase_DB1. With CORES = 8 the counter
// counts 0..3 once per core cycle, so each of the four data paths carries
// 1 GSPS. The LUT bank, the counter and the pairing of samples are the
// design's; which mux carries the phases, and the register on each mux
// output, are this design's choices.
//
// Timing: the LUT bank loads on ce_slow. The mux outputs are registered and
// load on ce_fast. ce_slow must coincide with a ce_fast (dds_ce_gen does
// this); on that tick the muxes send the last pair of the old word and the
// counter restarts at 0, so the next CORES/2 ce_fast ticks send pairs
// 0..CORES/2-1 of the new word.
module dds_sine_lut_module #(
  parameter int unsigned CORES   = dds_pkg::CORES,
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W,
  parameter int unsigned LUT_AW  = dds_pkg::LUT_AW,
  parameter int unsigned AMP_W   = dds_pkg::AMP_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce_slow,
  input  logic                    ce_fast,
  input  logic [PHASE_W-1:0]      phase     [CORES],
  output logic signed [AMP_W-1:0] sine_par  [CORES],
  output logic [PHASE_W-1:0]      phase_par [CORES],
  output logic signed [AMP_W-1:0] db0,
  output logic signed [AMP_W-1:0] db1,
  output logic [PHASE_W-1:0]      phase_db0,
  output logic [PHASE_W-1:0]      phase_db1,
  output logic [$clog2(CORES/2)-1:0] count
);
  localparam int unsigned PAIRS = CORES / 2;
  localparam int unsigned CNT_W = $clog2(PAIRS);

  // LUT bank: one converter per sample lane.
  for (genvar k = 0; k < CORES; k++) begin : g_lut
    dds_sine_lut #(.PHASE_W(PHASE_W), .LUT_AW(LUT_AW), .AMP_W(AMP_W)) u_lut (
      .clk  (clk),
      .rst_n(rst_n),
      .ce   (ce_slow),
      .phase(phase[k]),
      .amp  (sine_par[k])
    );
  end

  // Phase delay line matching the LUT stage.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < CORES; k++) phase_par[k] <= '0;
    end else if (ce_slow) begin
      for (int k = 0; k < CORES; k++) phase_par[k] <= phase[k];
    end
  end

  // Counter and the four multiplexers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count     <= '0;
      db0       <= '0;
      db1       <= '0;
      phase_db0 <= '0;
      phase_db1 <= '0;
    end else if (ce_fast) begin
      db0       <= sine_par [2 * count];        // MUX1
      db1       <= sine_par [2 * count + 1];    // MUX3
      phase_db0 <= phase_par[2 * count];        // MUX2
      phase_db1 <= phase_par[2 * count + 1];    // MUX4
      count     <= ce_slow ? '0 : CNT_W'(count + 1'b1);
    end
  end

  initial assert (CORES >= 4 && (1 << CNT_W) == PAIRS)
    else $error("CORES must be a power of two, at least 4");
  a_slow_on_fast: assert property (@(posedge clk) disable iff (!rst_n) ce_slow |-> ce_fast);
endmodule
