// loco_tb_pkg: testbench helpers for LOCOFloat numbers.
//
// Conversions between real and LOCOFloat used by the testbenches to build
// stimuli and to judge results independently of the RTL:
//   value = significand * 2^(-point_location)
// to_loco25 picks the point location that puts |significand| in
// [2^22, 2^23), one headroom bit below the 25-bit limit, and truncates.
package loco_tb_pkg;
  import loco_pkg::*;

  function automatic real pow2(input int e);
    return 2.0 ** e;
  endfunction

  function automatic real real25(input loco25_t a);
    return real'(longint'(a.sig)) * pow2(-int'(a.pl));
  endfunction

  function automatic real real50(input loco50_t a);
    return real'(longint'(a.sig)) * pow2(-int'(a.pl));
  endfunction

  function automatic loco25_t to_loco25(input real x);
    loco25_t r;
    real     m;
    int      pl;
    if (x == 0.0) begin
      r.sig = '0;
      r.pl  = PL_MAX;
      return r;
    end
    m  = (x < 0.0) ? -x : x;
    pl = 22 - $rtoi($floor($ln(m) / $ln(2.0)));
    while (m * pow2(pl) >= 8388608.0 && pl > -128) pl--;
    while (m * pow2(pl) <  4194304.0 && pl <  127) pl++;
    r.sig = SIG_W'($rtoi(x * pow2(pl)));
    r.pl  = pl_t'(pl);
    return r;
  endfunction
endpackage
