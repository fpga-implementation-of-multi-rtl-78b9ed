// dds_tb_pkg: reference models shared by the DDS testbenches.
//
// They restate the specification independently of the RTL: the tuning word
// floor(f * 2^N / fs) in exact integer arithmetic, and the amplitude
// round(sin(2*pi*a/2^aw) * (2^(w-1)-1)) of the sine table entry addressed
// by the top aw bits of an N-bit phase.
package dds_tb_pkg;
  function automatic longint unsigned ref_ftw(longint unsigned f, int unsigned n, longint unsigned fs);
    return (f << n) / fs;
  endfunction

  function automatic int ref_sine(longint unsigned phase, int unsigned n, int unsigned aw, int unsigned w);
    longint unsigned a;
    real ang, amp;
    a   = (phase >> (n - aw)) & ((longint'(1) << aw) - 1);
    ang = 2.0 * 3.14159265358979323846 * real'(a) / real'(longint'(1) << aw);
    amp = $sin(ang) * real'((1 << (w - 1)) - 1);
    return (amp >= 0.0) ? int'($floor(amp + 0.5)) : -int'($floor(-amp + 0.5));
  endfunction
endpackage
