// cdtw_pkg: types and constants shared by the cDTW distance-matrix accelerator.
//
// Number formats (chosen for this RTL; the reference software works in
// single-precision float):
//   sample_t  signed 16-bit raw signal / query sample
//   znorm_t   signed 16-bit z-normalised value, FRAC = 11 fractional bits
//   stat_t    per-epoch / per-pattern statistics: mean in sample units and the
//             inverse standard deviation as an unsigned fixed-point number
//             inv_std = round(2^(INV_FRAC+FRAC) / sigma)
//   cost_t    unsigned 32-bit accumulated warping cost; all ones is "infinity"
//             and additions saturate at it, so infinity + d stays infinity.
package cdtw_pkg;

  localparam int SAMPLE_W = 16;
  localparam int Z_W      = 16;
  localparam int FRAC     = 11;
  localparam int INV_W    = 24;
  localparam int INV_FRAC = 16;
  localparam int COST_W   = 32;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [Z_W-1:0]      znorm_t;
  typedef logic        [COST_W-1:0]   cost_t;

  typedef struct packed {
    sample_t              mean;
    logic [INV_W-1:0]     inv_std;
  } stat_t;

  localparam cost_t COST_INF = '1;

  // Saturating addition of two costs.
  function automatic cost_t cost_add(cost_t a, cost_t b);
    logic [COST_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[COST_W] ? COST_INF : s[COST_W-1:0];
  endfunction

  function automatic cost_t cost_min3(cost_t a, cost_t b, cost_t c);
    cost_t m;
    m = (a < b) ? a : b;
    return (m < c) ? m : c;
  endfunction

endpackage
