// cdtw_kernel: basic kernel of the cDTW distance-matrix accelerator.
//
// One epoch generator, one pattern generator, PEP = E/STRIDE computation
// modules and one result write-back module, joined by FIFO queues:
//
//   signal --> epoch_gen --epoch queue s--> cdtw_compute[s] --DTW queue s--> result_wb --> memory
//   query  --> pattern_gen --pattern queue--> cdtw_compute[0] --> [1] --> ... --> [PEP-1]
//
// The PEP computation modules work in parallel on different epochs (module s
// gets epochs s, s+PEP, ... of the block) and on the same NP patterns, which
// travel serially from one module to the next through the pattern queues.
// Everything is data-driven: each module only moves when its queues allow.
// Queue depths follow the document's queue definitions: epoch queues
// STRIDE+10 (module s+1 runs up to one stride behind module s), pattern queues
// STRIDE*NP (one stride of rows of all patterns), DTW queues NP.
//
// One block: start (while idle) with n_epochs (a multiple of PEP, at most
// NE_MAX) and load_patterns. The kernel reads n_epochs statistics words and
// (n_epochs+PEP-1)*STRIDE signal samples, NP statistics words and NP*E query
// samples (when loading), and writes NP*n_epochs distances, pattern-major.
// done pulses when the last distance has been written.
// Throughput: each module completes one band cell per cycle, so the kernel
// produces PEP*NP distances every E*(2W+1)*NP cycles in steady state.
// The generators' done pulses and the modules' stall flags are not needed
// by the kernel's own control (the last write-back ends a block); they are
// kept as named nets for observation in simulation. The queue fill levels
// are left unconnected for the same reason.
module cdtw_kernel
  import cdtw_pkg::*;
#(
  parameter int E        = 1024,
  parameter int W        = 16,
  parameter int NP       = 32,
  parameter int STRIDE   = 256,
  parameter int NE_MAX   = 512,
  parameter int SQ_SHIFT = 11,
  parameter int PEP      = E / STRIDE,
  parameter int ADDR_W   = $clog2(NP * NE_MAX)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [$clog2(NE_MAX+1)-1:0] n_epochs,
  input  logic                        load_patterns,
  output logic                        busy,
  output logic                        done,
  // signal and per-epoch statistics
  input  logic                        sig_valid,
  output logic                        sig_ready,
  input  sample_t                     sig_data,
  input  logic                        est_valid,
  output logic                        est_ready,
  input  stat_t                       est_data,
  // query (patterns) and per-pattern statistics
  input  logic                        q_valid,
  output logic                        q_ready,
  input  sample_t                     q_data,
  input  logic                        pst_valid,
  output logic                        pst_ready,
  input  stat_t                       pst_data,
  // distance write port
  output logic                        wr_valid,
  input  logic                        wr_ready,
  output logic [ADDR_W-1:0]           wr_addr,
  output cost_t                       wr_data
);
  localparam int NR_MAX = NE_MAX / PEP;
  localparam int EQ_D   = STRIDE + 10;
  localparam int PQ_D   = STRIDE * NP;

  // ------------------------------------------------------------ epochs
  logic [PEP-1:0] eg_valid, eg_ready;
  znorm_t         eg_data;
  logic [PEP-1:0] eq_valid, eq_ready;
  znorm_t         eq_data [PEP];
  logic           eg_busy, eg_done;

  epoch_gen #(.E(E), .STRIDE(STRIDE), .NE_MAX(NE_MAX), .PEP(PEP)) u_epoch_gen (
    .clk, .rst_n, .start, .n_epochs, .busy(eg_busy), .done(eg_done),
    .sig_valid, .sig_ready, .sig_data,
    .st_valid(est_valid), .st_ready(est_ready), .st_data(est_data),
    .out_valid(eg_valid), .out_ready(eg_ready), .out_data(eg_data));

  // ----------------------------------------------------------- patterns
  logic   pg_busy, pg_done;
  logic   pch_valid [PEP+1];     // pattern chain: 0 = generator output
  logic   pch_ready [PEP+1];
  znorm_t pch_data  [PEP+1];

  pattern_gen #(.E(E), .NP(NP), .NR_MAX(NR_MAX)) u_pattern_gen (
    .clk, .rst_n, .start, .load_patterns,
    .n_rounds($clog2(NR_MAX+1)'(n_epochs / PEP)),
    .busy(pg_busy), .done(pg_done),
    .q_valid, .q_ready, .q_data,
    .pst_valid, .pst_ready, .pst_data,
    .out_valid(pch_valid[0]), .out_ready(pch_ready[0]), .out_data(pch_data[0]));

  // ------------------------------------------------ computation modules
  logic [PEP-1:0] res_valid, res_ready;
  cost_t          res_data [PEP];
  logic [PEP-1:0] cm_stall, cm_epoch_done;

  for (genvar s = 0; s < PEP; s++) begin : g_mod
    logic   pq_valid, pq_ready;
    znorm_t pq_data;

    sync_fifo #(.W(Z_W), .DEPTH(EQ_D)) u_epoch_q (
      .clk, .rst_n,
      .in_valid(eg_valid[s]), .in_ready(eg_ready[s]), .in_data(eg_data),
      .out_valid(eq_valid[s]), .out_ready(eq_ready[s]), .out_data(eq_data[s]),
      .count());

    sync_fifo #(.W(Z_W), .DEPTH(PQ_D)) u_pattern_q (
      .clk, .rst_n,
      .in_valid(pch_valid[s]), .in_ready(pch_ready[s]), .in_data(pch_data[s]),
      .out_valid(pq_valid), .out_ready(pq_ready), .out_data(pq_data),
      .count());

    cdtw_compute #(.E(E), .W(W), .NP(NP), .SQ_SHIFT(SQ_SHIFT),
                   .FORWARD(s < PEP - 1), .RES_DEPTH(NP)) u_compute (
      .clk, .rst_n,
      .ep_valid(eq_valid[s]), .ep_ready(eq_ready[s]), .ep_data(eq_data[s]),
      .pat_valid(pq_valid), .pat_ready(pq_ready), .pat_data(pq_data),
      .patout_valid(pch_valid[s+1]), .patout_ready(pch_ready[s+1]),
      .patout_data(pch_data[s+1]),
      .res_valid(res_valid[s]), .res_ready(res_ready[s]), .res_data(res_data[s]),
      .stall(cm_stall[s]), .epoch_done(cm_epoch_done[s]));
  end

  // the last module forwards nothing
  assign pch_ready[PEP] = 1'b0;

  // ------------------------------------------------------- write-back
  logic wb_busy;

  result_wb #(.NP(NP), .PEP(PEP), .NE_MAX(NE_MAX), .ADDR_W(ADDR_W)) u_result_wb (
    .clk, .rst_n, .start, .n_epochs, .busy(wb_busy), .done,
    .res_valid, .res_ready, .res_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  assign busy = eg_busy || pg_busy || wb_busy;
endmodule
