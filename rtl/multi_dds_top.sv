// multi_dds_top: 8-core DDS that synthesises a 2 GSPS sine from 250 MHz logic.
//
// A single DDS can only produce samples at its own clock rate. Here one
// accumulator is shared by CORES sample lanes: per core cycle it produces
// CORES consecutive sample phases (the accumulated phase plus offsets
// k*dF), CORES sine LUTs turn them into amplitudes, and the samples are
// then serialised, two per 1 GHz tick, and interleaved to a 2 GSPS stream.
//   freq_hz -> dds_phase_register -> dds_phase_accumulator
//           -> dds_sine_lut_module (LUTs, counter, MUX1..4) -> dds_dac_mock
// The chain and its rates are the design's; the single-clock, clock-enable
// realisation of the three rates (dds_ce_gen) is this design's choice.
//
// Interface: clk is the sample clock (2 GHz nominal, FS_HZ); ce_slow
// (1 in 8, 250 MHz) and ce_fast (1 in 2, 1 GHz) are brought out for
// observation. freq_hz is the output frequency in Hz, sampled on ce_slow;
// ftw is the tuning word in use. par_phase/par_sine are the CORES parallel
// samples of the current core cycle, db*/phase_db* the four 1 GSPS paths,
// sine/phase the 2 GSPS output, one new sample on every clk; count is the
// mux counter (which sample pair is on DB0/DB1).
//
// Timing: a new freq_hz reaches ftw after 3 ce_slow ticks; the first sample
// of the new frequency appears on sine 2 ce_slow ticks after that (phase,
// LUT) plus 2..9 clk cycles through the muxes and the mock DAC. Sample n of
// the stream (from reset, constant dF) carries phase n*dF mod 2^N.
module multi_dds_top #(
  parameter int unsigned     CORES   = dds_pkg::CORES,
  parameter int unsigned     PHASE_W = dds_pkg::PHASE_W,
  parameter int unsigned     FREQ_W  = dds_pkg::FREQ_W,
  parameter int unsigned     LUT_AW  = dds_pkg::LUT_AW,
  parameter int unsigned     AMP_W   = dds_pkg::AMP_W,
  parameter longint unsigned FS_HZ   = dds_pkg::FS_HZ
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [FREQ_W-1:0]       freq_hz,
  output logic                    ce_slow,
  output logic                    ce_fast,
  output logic [PHASE_W-1:0]      ftw,
  output logic [PHASE_W-1:0]      par_phase [CORES],
  output logic signed [AMP_W-1:0] par_sine  [CORES],
  output logic signed [AMP_W-1:0] db0,
  output logic signed [AMP_W-1:0] db1,
  output logic [PHASE_W-1:0]      phase_db0,
  output logic [PHASE_W-1:0]      phase_db1,
  output logic signed [AMP_W-1:0] sine,
  output logic [PHASE_W-1:0]      phase,
  output logic [$clog2(CORES/2)-1:0] count
);
  logic [PHASE_W-1:0] step;
  logic [PHASE_W-1:0] offset [CORES];
  logic [PHASE_W-1:0] acc_phase [CORES];

  dds_ce_gen #(.FAST_DIV(2), .SLOW_DIV(CORES)) u_ce (
    .clk    (clk),
    .rst_n  (rst_n),
    .ce_fast(ce_fast),
    .ce_slow(ce_slow)
  );

  dds_phase_register #(
    .CORES(CORES), .PHASE_W(PHASE_W), .FREQ_W(FREQ_W), .FS_HZ(FS_HZ)
  ) u_phase_reg (
    .clk    (clk),
    .rst_n  (rst_n),
    .ce     (ce_slow),
    .freq_hz(freq_hz),
    .ftw    (ftw),
    .step   (step),
    .offset (offset)
  );

  dds_phase_accumulator #(.CORES(CORES), .PHASE_W(PHASE_W)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .ce    (ce_slow),
    .step  (step),
    .offset(offset),
    .phase (acc_phase)
  );

  dds_sine_lut_module #(
    .CORES(CORES), .PHASE_W(PHASE_W), .LUT_AW(LUT_AW), .AMP_W(AMP_W)
  ) u_lut_mod (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce_slow  (ce_slow),
    .ce_fast  (ce_fast),
    .phase    (acc_phase),
    .sine_par (par_sine),
    .phase_par(par_phase),
    .db0      (db0),
    .db1      (db1),
    .phase_db0(phase_db0),
    .phase_db1(phase_db1),
    .count    (count)
  );

  dds_dac_mock #(.PHASE_W(PHASE_W), .AMP_W(AMP_W)) u_dac (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce_fast  (ce_fast),
    .db0      (db0),
    .db1      (db1),
    .phase_db0(phase_db0),
    .phase_db1(phase_db1),
    .sine     (sine),
    .phase    (phase)
  );
endmodule
