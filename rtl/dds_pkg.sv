// dds_pkg: shared constants, types and elaboration-time functions of the
// 8-core (multi-phase) DDS.
//
// The design produces CORES consecutive samples of a sine wave per core clock
// cycle. With CORES = 8 and a 250 MHz core clock this gives 2 GSPS. The
// N-bit phase accumulator width follows from the tuning-word example of the
// design: a 64 MHz tone at 2 GSPS uses the tuning word 8589934, which is
// floor(64e6 * 2^28 / 2e9), so N = 28.
//
// Functions here are evaluated only at elaboration. They fill the sine table
// and compute the constant reciprocal that turns a frequency in Hz into a
// tuning word. The table size and the amplitude width are this design's own
// choice (1024 x 14 bit).
package dds_pkg;

  localparam int unsigned CORES   = 8;            // samples per core cycle
  localparam int unsigned PHASE_W = 28;           // phase accumulator width N
  localparam int unsigned FREQ_W  = 30;           // frequency input, Hz (750 MHz max)
  localparam int unsigned LUT_AW  = 10;           // sine table address bits
  localparam int unsigned AMP_W   = 14;           // signed amplitude bits
  localparam int unsigned FRAC_W  = 51;           // fraction bits of the reciprocal
  localparam longint unsigned FS_HZ = 64'd2_000_000_000;  // aggregate sample rate

  // Reciprocal used by the phase register: ftw = (f * K) >> (FRAC_W), with
  // K = ceil(2^(phase_w + frac_w) / fs_hz). Rounding K up makes the product
  // never fall below the exact quotient, and with enough fraction bits the
  // error stays below the quotient's smallest fractional step, so the
  // truncated result equals floor(f * 2^N / fs) exactly.
  function automatic logic [127:0] ftw_reciprocal(int unsigned phase_w,
                                                  int unsigned frac_w,
                                                  longint unsigned fs_hz);
    logic [127:0] num;
    num = 128'd1 << (phase_w + frac_w);
    return (num + 128'(fs_hz) - 128'd1) / 128'(fs_hz);
  endfunction

  // One entry of the full-cycle sine table:
  // round(sin(2*pi*a / 2^aw) * (2^(w-1) - 1)).
  function automatic longint sine_entry(int unsigned a, int unsigned aw, int unsigned w);
    real x;
    x = $sin(2.0 * 3.14159265358979323846 * real'(a) / real'(longint'(1) << aw))
        * real'((longint'(1) << (w - 1)) - 1);
    return longint'($floor(x + 0.5));
  endfunction

endpackage
