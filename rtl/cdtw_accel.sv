// cdtw_accel: top level of the cDTW distance-matrix accelerator.
//
// NR copies of the basic kernel (cdtw_kernel) side by side. The host splits
// the distance matrix into chunks of NR x n_epochs epochs by NP patterns;
// kernel r computes epochs r*n_epochs .. (r+1)*n_epochs-1 of the chunk
// against the same NP patterns. Every kernel has its own memory streams
// (signal, epoch statistics, query, pattern statistics, distance writes),
// standing where the load-store units towards the external (HBM) memory
// connect. All kernels start together; done pulses once all of them have
// finished, and busy is high while any is working.
// At the defaults (NR = 24, PEP = 4 modules per kernel, NP = 32) the
// accelerator holds 96 computation modules, each finishing one band cell per
// clock, so the accelerator completes 96*32 = 3072 distances every
// E*(2W+1)*NP = 1024*33*32 cycles in steady state.
module cdtw_accel
  import cdtw_pkg::*;
#(
  parameter int NR       = 24,
  parameter int E        = 1024,
  parameter int W        = 16,
  parameter int NP       = 32,
  parameter int STRIDE   = 256,
  parameter int NE_MAX   = 512,
  parameter int SQ_SHIFT = 11,
  parameter int ADDR_W   = $clog2(NP * NE_MAX)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [$clog2(NE_MAX+1)-1:0] n_epochs,
  input  logic                        load_patterns,
  output logic                        busy,
  output logic                        done,
  input  logic    [NR-1:0]            sig_valid,
  output logic    [NR-1:0]            sig_ready,
  input  sample_t                     sig_data  [NR],
  input  logic    [NR-1:0]            est_valid,
  output logic    [NR-1:0]            est_ready,
  input  stat_t                       est_data  [NR],
  input  logic    [NR-1:0]            q_valid,
  output logic    [NR-1:0]            q_ready,
  input  sample_t                     q_data    [NR],
  input  logic    [NR-1:0]            pst_valid,
  output logic    [NR-1:0]            pst_ready,
  input  stat_t                       pst_data  [NR],
  output logic    [NR-1:0]            wr_valid,
  input  logic    [NR-1:0]            wr_ready,
  output logic    [ADDR_W-1:0]        wr_addr   [NR],
  output cost_t                       wr_data   [NR]
);
  logic [NR-1:0] k_busy, k_done, finished;

  for (genvar r = 0; r < NR; r++) begin : g_kernel
    cdtw_kernel #(.E(E), .W(W), .NP(NP), .STRIDE(STRIDE), .NE_MAX(NE_MAX),
                  .SQ_SHIFT(SQ_SHIFT), .ADDR_W(ADDR_W)) u_kernel (
      .clk, .rst_n, .start, .n_epochs, .load_patterns,
      .busy(k_busy[r]), .done(k_done[r]),
      .sig_valid(sig_valid[r]), .sig_ready(sig_ready[r]), .sig_data(sig_data[r]),
      .est_valid(est_valid[r]), .est_ready(est_ready[r]), .est_data(est_data[r]),
      .q_valid(q_valid[r]), .q_ready(q_ready[r]), .q_data(q_data[r]),
      .pst_valid(pst_valid[r]), .pst_ready(pst_ready[r]), .pst_data(pst_data[r]),
      .wr_valid(wr_valid[r]), .wr_ready(wr_ready[r]), .wr_addr(wr_addr[r]),
      .wr_data(wr_data[r]));
  end

  // sticky per-kernel completion
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     finished <= '0;
    else if (start) finished <= '0;
    else            finished <= finished | k_done;
  end

  logic all_done_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) all_done_q <= 1'b0;
    else        all_done_q <= (&(finished | k_done)) && !start;
  end

  assign done = (&(finished | k_done)) && !start && !all_done_q;
  assign busy = |k_busy;
endmodule
