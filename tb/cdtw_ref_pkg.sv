// cdtw_ref_pkg: software reference for the testbenches.
// A straightforward full dynamic-programming cDTW over the whole band,
// written independently of the interleaved hardware schedule, plus the
// fixed-point z-normalisation formula used by the generators.
package cdtw_ref_pkg;
  import cdtw_pkg::*;

  localparam longint BIG = 64'h7fff_ffff_ffff;

  function automatic longint sqd(int a, int b, int sh);
    longint d;
    d = longint'(a) - longint'(b);
    return (d * d) >>> sh;
  endfunction

  // ev / pv: z-normalised epoch and pattern values (length e)
  function automatic longint ref_cdtw(int ev[], int pv[], int e, int w, int sh);
    longint prev[], cur[];
    prev = new[e];
    cur  = new[e];
    for (int j = 0; j < e; j++) prev[j] = BIG;
    for (int i = 0; i < e; i++) begin
      for (int j = 0; j < e; j++) cur[j] = BIG;
      for (int j = ((i - w) < 0 ? 0 : i - w); j <= ((i + w) > e - 1 ? e - 1 : i + w); j++) begin
        longint best;
        if (i == 0 && j == 0) best = 0;
        else begin
          best = BIG;
          if (j > 0 && cur[j-1] < best)               best = cur[j-1];
          if (i > 0 && prev[j] < best)                best = prev[j];
          if (i > 0 && j > 0 && prev[j-1] < best)     best = prev[j-1];
        end
        cur[j] = (best >= BIG) ? BIG : best + sqd(pv[i], ev[j], sh);
      end
      prev = cur;
      cur  = new[e];
    end
    return prev[e-1];
  endfunction

  function automatic int ref_z(int x, int mean, int inv_std);
    longint p;
    p = (longint'(x) - longint'(mean)) * longint'(inv_std);
    p = p >>> INV_FRAC;
    if (p > 32767)  p = 32767;
    if (p < -32768) p = -32768;
    return int'(p);
  endfunction

  function automatic cost_t to_cost(longint v);
    return (v >= longint'(COST_INF)) ? COST_INF : cost_t'(v);
  endfunction
endpackage
