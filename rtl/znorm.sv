// znorm: z-normalisation arithmetic unit of the epoch and pattern generators.
//
// z = (x - mean) * inv_std, with mean and the inverse standard deviation
// precomputed by the host and stored next to the data, so no division is
// needed in hardware. In fixed point:
//   z = sat_Z_W( ((x - mean) * inv_std) >>> INV_FRAC )
// where inv_std = round(2^(INV_FRAC+FRAC) / sigma), giving z with FRAC
// fractional bits. Results outside the znorm_t range saturate.
// Purely combinational; the caller registers the result.
module znorm
  import cdtw_pkg::*;
(
  input  sample_t x,
  input  stat_t   st,
  output znorm_t  z
);
  localparam int PW = SAMPLE_W + 1 + INV_W + 1;
  logic signed [SAMPLE_W:0] diff;
  logic signed [PW-1:0]     prod;
  logic signed [PW-1:0]     sh;

  localparam logic signed [PW-1:0] ZMAX = PW'((64'sd1 <<< (Z_W - 1)) - 1);
  localparam logic signed [PW-1:0] ZMIN = -ZMAX - 1;

  always_comb begin
    diff = $signed({x[SAMPLE_W-1], x}) - $signed({st.mean[SAMPLE_W-1], st.mean});
    prod = PW'(diff) * $signed({1'b0, st.inv_std});
    sh   = prod >>> INV_FRAC;
    if (sh > ZMAX)      z = ZMAX[Z_W-1:0];
    else if (sh < ZMIN) z = ZMIN[Z_W-1:0];
    else                z = sh[Z_W-1:0];
  end
endmodule
