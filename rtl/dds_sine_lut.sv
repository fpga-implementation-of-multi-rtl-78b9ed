// dds_sine_lut: one phase-to-amplitude converter (sine look-up table).
//
// The top LUT_AW bits of the PHASE_W-bit phase address a full-cycle table
// holding round(sin(2*pi*a/2^LUT_AW) * (2^(AMP_W-1)-1)) as signed
// two's-complement amplitudes. The table is computed at elaboration (a ROM;
// it maps to block RAM). The read is registered and advances on ce, so
// amp follows phase one ce later. A synchronous reset clears the output
// register to 0, the amplitude of phase 0 (a block-ROM output register with
// reset), so amplitude and phase paths agree from reset on. The design uses a sine LUT per sample
// lane; table size, amplitude width, phase truncation and the single
// register stage are this design's choices.
module dds_sine_lut #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W,
  parameter int unsigned LUT_AW  = dds_pkg::LUT_AW,
  parameter int unsigned AMP_W   = dds_pkg::AMP_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic [PHASE_W-1:0]      phase,
  output logic signed [AMP_W-1:0] amp
);
  localparam int unsigned DEPTH = 1 << LUT_AW;
  typedef logic signed [AMP_W-1:0] amp_t;
  typedef amp_t rom_t [DEPTH];

  function automatic rom_t fill_rom();
    rom_t r;
    for (int unsigned a = 0; a < DEPTH; a++) r[a] = amp_t'(dds_pkg::sine_entry(a, LUT_AW, AMP_W));
    return r;
  endfunction

  localparam rom_t ROM = fill_rom();

  logic [LUT_AW-1:0] addr;
  assign addr = phase[PHASE_W-1 -: LUT_AW];

  always_ff @(posedge clk) begin
    if (!rst_n)  amp <= '0;
    else if (ce) amp <= ROM[addr];
  end
endmodule
