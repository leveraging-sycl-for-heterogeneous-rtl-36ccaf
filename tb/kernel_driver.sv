// kernel_driver: memory-side model for one basic kernel in the testbenches.
//
// Generates NBLK blocks of random signal (n_epochs = NEP epochs per block) and
// NP random patterns with their statistics (mean and inverse standard
// deviation, computed here in floating point), serves them on the kernel's
// four input streams with optional random gaps, accepts the distance writes
// with optional random back-pressure (and, with LONG_BP, long windows in which
// the write port is blocked) and checks every written distance against
// the reference cDTW of the z-normalised epoch and pattern. Block 0 loads the
// patterns; later blocks reuse them, so the query is streamed only once.
module kernel_driver
  import cdtw_pkg::*;
  import cdtw_ref_pkg::*;
#(
  parameter int E = 32, parameter int W = 4, parameter int NP = 8,
  parameter int STRIDE = 8, parameter int NEP = 8, parameter int NBLK = 1,
  parameter int SQ_SHIFT = 11, parameter int ADDR_W = 8,
  parameter bit GAPS = 1'b1, parameter int SEED = 1,
  parameter int LONG_BP = 0        // >0: write port also blocked in windows of this many cycles
) (
  input  logic              clk,
  input  logic              rst_n,
  input  int                blk_now,      // block the kernel is working on
  output logic              sig_valid,
  input  logic              sig_ready,
  output sample_t           sig_data,
  output logic              est_valid,
  input  logic              est_ready,
  output stat_t             est_data,
  output logic              q_valid,
  input  logic              q_ready,
  output sample_t           q_data,
  output logic              pst_valid,
  input  logic              pst_ready,
  output stat_t             pst_data,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [ADDR_W-1:0] wr_addr,
  input  cost_t             wr_data,
  output int                checks,
  output int                failures,
  output int                writes
);
  localparam int PEP  = E / STRIDE;
  localparam int NSIG = (NEP + PEP - 1) * STRIDE;

  sample_t sig   [NBLK][NSIG];
  stat_t   est   [NBLK][NEP];
  sample_t pat   [NP][E];
  stat_t   pst   [NP];
  cost_t   expv  [NBLK][NEP][NP];
  bit      seen  [NBLK][NEP * NP];

  function automatic stat_t make_stat(int v[]);
    real mu, var_, sd;
    stat_t st;
    mu = 0.0;
    foreach (v[i]) mu += v[i];
    mu = mu / v.size();
    var_ = 0.0;
    foreach (v[i]) var_ += (v[i] - mu) * (v[i] - mu);
    sd = $sqrt(var_ / v.size());
    if (sd < 1.0) sd = 1.0;
    st.mean    = sample_t'($rtoi(mu));
    st.inv_std = INV_W'($rtoi(real'(longint'(1) << (INV_FRAC + FRAC)) / sd + 0.5));
    return st;
  endfunction

  initial begin
    int s = SEED;
    int v[];
    int ez[], pz[][];
    v = new[E];
    ez = new[E];
    pz = new[NP];
    // patterns: random-walk shapes of random amplitude
    for (int m = 0; m < NP; m++) begin
      int acc = 0;
      for (int j = 0; j < E; j++) begin
        acc += $signed($urandom(s * 977 + m * 131 + j) % 201) - 100;
        if (acc > 20000 || acc < -20000) acc = acc / 2;
        pat[m][j] = sample_t'(acc);
        v[j] = int'(pat[m][j]);
      end
      pst[m] = make_stat(v);
      pz[m] = new[E];
      for (int j = 0; j < E; j++) pz[m][j] = ref_z(v[j], int'(pst[m].mean), int'(pst[m].inv_std));
    end
    for (int b = 0; b < NBLK; b++) begin
      int acc = 0;
      for (int i = 0; i < NSIG; i++) begin
        acc += $signed($urandom(s * 7 + b * 65537 + i) % 301) - 150;
        if (acc > 20000 || acc < -20000) acc = acc / 2;
        sig[b][i] = sample_t'(acc);
      end
      for (int q = 0; q < NEP; q++) begin
        for (int j = 0; j < E; j++) v[j] = int'(sig[b][q * STRIDE + j]);
        est[b][q] = make_stat(v);
        for (int j = 0; j < E; j++) ez[j] = ref_z(v[j], int'(est[b][q].mean), int'(est[b][q].inv_std));
        for (int m = 0; m < NP; m++) expv[b][q][m] = to_cost(ref_cdtw(ez, pz[m], E, W, SQ_SHIFT));
      end
      for (int i = 0; i < NEP * NP; i++) seen[b][i] = 1'b0;
    end
  end

  int  si, ei, qi, pi, cyc;
  logic g1, g2, g3, g4, g5;

  assign sig_valid = (si < NBLK * NSIG) && !g1;
  assign sig_data  = sig[(si / NSIG) % NBLK][si % NSIG];
  assign est_valid = (ei < NBLK * NEP) && !g2;
  assign est_data  = est[(ei / NEP) % NBLK][ei % NEP];
  assign q_valid   = (qi < NP * E) && !g3;
  assign q_data    = pat[(qi / E) % NP][qi % E];
  assign pst_valid = (pi < NP) && !g4;
  assign pst_data  = pst[pi % NP];
  assign wr_ready  = !g5 && !(LONG_BP > 0 && ((cyc / (LONG_BP > 0 ? LONG_BP : 1)) % 3) == 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      si <= 0; ei <= 0; qi <= 0; pi <= 0; cyc <= 0;
      checks <= 0; failures <= 0; writes <= 0;
      {g1, g2, g3, g4, g5} <= '0;
    end else begin
      cyc <= cyc + 1;
      if (GAPS) begin
        g1 <= ($urandom % 8) == 0;
        g2 <= ($urandom % 4) == 0;
        g3 <= ($urandom % 8) == 0;
        g4 <= ($urandom % 4) == 0;
        g5 <= ($urandom % 3) == 0;
      end
      if (sig_valid && sig_ready) si <= si + 1;
      if (est_valid && est_ready) ei <= ei + 1;
      if (q_valid && q_ready)     qi <= qi + 1;
      if (pst_valid && pst_ready) pi <= pi + 1;
      if (wr_valid && wr_ready) begin
        automatic int b = blk_now;
        automatic int a = int'(wr_addr);
        automatic int m = a / NEP;
        automatic int q = a % NEP;
        writes <= writes + 1;
        checks <= checks + 1;
        if (b >= NBLK || a >= NEP * NP) begin
          failures <= failures + 1;
          $display("kernel driver %0d: write outside block, addr %0d", SEED, a);
        end else if (seen[b][a]) begin
          failures <= failures + 1;
          $display("kernel driver %0d: address %0d written twice", SEED, a);
        end else begin
          seen[b][a] <= 1'b1;
          if (wr_data != expv[b][q][m]) begin
            failures <= failures + 1;
            $display("kernel driver %0d: block %0d epoch %0d pattern %0d got %0d expected %0d",
                     SEED, b, q, m, wr_data, expv[b][q][m]);
          end
        end
      end
    end
  end
endmodule
