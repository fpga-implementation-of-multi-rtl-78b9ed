// dds_phase_register: frequency to tuning word, plus the eight phase offsets.
//
// Implements the tuning-word equation dF = f_out * 2^N / f_s (f_s the
// aggregate sample rate, 2 GHz) for an output frequency given in Hz. For
// 64 MHz it gives 8589934, the design's example. It then forms the CORES
// phase offsets k*dF (k = 0..CORES-1) that place the CORES samples of one
// core cycle, and the accumulator step CORES*dF.
//
// How: the division by f_s is a multiplication by a constant reciprocal K
// (see dds_pkg::ftw_reciprocal) and a truncating right shift, which is exact
// for every input below 2^FREQ_W. The offsets k*dF are constant multiples
// (shift-and-add). The pipeline has three stages, all advancing on ce
// (250 MHz): input register, product register, output register. ftw, step
// and offset are updated together, so a frequency change reaches the
// accumulator as one consistent update, 3 ce ticks after freq_hz is sampled.
// Truncation instead of rounding and the pipeline depth are this design's
// choices; the equation and the eight offsets are the design's. Some output
// bits are constant by construction (offset[0] is always 0, the low bits of
// step and of the even offsets are 0); they are kept so every lane has the
// same interface.
module dds_phase_register #(
  parameter int unsigned    CORES   = dds_pkg::CORES,
  parameter int unsigned    PHASE_W = dds_pkg::PHASE_W,
  parameter int unsigned    FREQ_W  = dds_pkg::FREQ_W,
  parameter int unsigned    FRAC_W  = dds_pkg::FRAC_W,
  parameter longint unsigned FS_HZ  = dds_pkg::FS_HZ
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic [FREQ_W-1:0]   freq_hz,
  output logic [PHASE_W-1:0]  ftw,
  output logic [PHASE_W-1:0]  step,
  output logic [PHASE_W-1:0]  offset [CORES]
);
  localparam logic [127:0] K_FULL = dds_pkg::ftw_reciprocal(PHASE_W, FRAC_W, FS_HZ);
  localparam int unsigned  K_W    = $clog2(K_FULL + 128'd1);
  localparam logic [K_W-1:0] K    = K_W'(K_FULL);
  localparam int unsigned  P_W    = FREQ_W + K_W;

  logic [FREQ_W-1:0]  freq_q;
  logic [P_W-1:0]     prod_q;
  logic [PHASE_W-1:0] ftw_d;

  // Only the bits of the quotient that fit in the phase word are kept:
  // dF is taken modulo 2^N like every phase quantity.
  assign ftw_d = PHASE_W'(prod_q >> FRAC_W);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      freq_q <= '0;
      prod_q <= '0;
      ftw    <= '0;
      step   <= '0;
      for (int k = 0; k < CORES; k++) offset[k] <= '0;
    end else if (ce) begin
      freq_q <= freq_hz;
      prod_q <= P_W'(freq_q) * P_W'(K);
      ftw    <= ftw_d;
      step   <= PHASE_W'(ftw_d * PHASE_W'(CORES));
      for (int k = 0; k < CORES; k++) offset[k] <= PHASE_W'(ftw_d * PHASE_W'(k));
    end
  end
endmodule
