// cdtw_accel_tb: end-to-end test of the accelerator at reduced size: NR = 2
// kernels, E = 32, STRIDE = 8 (four computation modules per kernel), W = 4,
// NP = 8, two blocks of 8 epochs per kernel (the second block reuses the
// loaded patterns). Each kernel has its own memory model with random gaps and
// back-pressure, including long windows in which the write port is blocked; every distance is checked against the reference cDTW.
// The test also counts how often each flow-control mechanism of the design
// happened and fails if one never did.
module cdtw_accel_tb;
  import cdtw_pkg::*;
  localparam int NR = 2, E = 32, W = 4, NP = 8, STRIDE = 8, NE_MAX = 16, NEP = 8, NBLK = 2;
  localparam int PEP = E / STRIDE;
  localparam int ADDR_W = $clog2(NP * NE_MAX);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, load_patterns, busy, done;
  logic [$clog2(NE_MAX+1)-1:0] n_epochs;
  logic [NR-1:0] sig_valid, sig_ready, est_valid, est_ready, q_valid, q_ready;
  logic [NR-1:0] pst_valid, pst_ready, wr_valid, wr_ready;
  sample_t sig_data [NR], q_data [NR];
  stat_t est_data [NR], pst_data [NR];
  logic [ADDR_W-1:0] wr_addr [NR];
  cost_t wr_data [NR];
  int blk_now;
  int dchecks [NR], dfail [NR], writes [NR];

  cdtw_accel #(.NR(NR), .E(E), .W(W), .NP(NP), .STRIDE(STRIDE), .NE_MAX(NE_MAX)) dut (
    .clk, .rst_n, .start, .n_epochs, .load_patterns, .busy, .done,
    .sig_valid, .sig_ready, .sig_data, .est_valid, .est_ready, .est_data,
    .q_valid, .q_ready, .q_data, .pst_valid, .pst_ready, .pst_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  for (genvar r = 0; r < NR; r++) begin : g_drv
    kernel_driver #(.E(E), .W(W), .NP(NP), .STRIDE(STRIDE), .NEP(NEP), .NBLK(NBLK),
                    .SQ_SHIFT(11), .ADDR_W(ADDR_W), .GAPS(1'b1), .SEED(21 + r), .LONG_BP(6000)) drv (
      .clk, .rst_n, .blk_now,
      .sig_valid(sig_valid[r]), .sig_ready(sig_ready[r]), .sig_data(sig_data[r]),
      .est_valid(est_valid[r]), .est_ready(est_ready[r]), .est_data(est_data[r]),
      .q_valid(q_valid[r]), .q_ready(q_ready[r]), .q_data(q_data[r]),
      .pst_valid(pst_valid[r]), .pst_ready(pst_ready[r]), .pst_data(pst_data[r]),
      .wr_valid(wr_valid[r]), .wr_ready(wr_ready[r]), .wr_addr(wr_addr[r]),
      .wr_data(wr_data[r]),
      .checks(dchecks[r]), .failures(dfail[r]), .writes(writes[r]));
  end

  // ------------------------------------------------ mechanism counters
  // observed in kernel 0
  int n_cm_stall, n_eq_full, n_pq_full, n_res_full, n_wb_bp, n_transient,
      n_buf_wrap, n_band_edge, n_forward, n_reuse;

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < PEP; s++) begin
      if (dut.g_kernel[0].u_kernel.cm_stall[s]) n_cm_stall++;
      if (dut.g_kernel[0].u_kernel.eg_valid[s] && !dut.g_kernel[0].u_kernel.eg_ready[s]) n_eq_full++;
    end
    for (int s = 0; s < PEP; s++)
      if (dut.g_kernel[0].u_kernel.pch_valid[s] && !dut.g_kernel[0].u_kernel.pch_ready[s]) n_pq_full++;
    if (dut.g_kernel[0].u_kernel.g_mod[1].u_compute.state == 1'b1 &&
        !dut.g_kernel[0].u_kernel.g_mod[1].u_compute.ok_res) n_res_full++;
    if (wr_valid[0] && !wr_ready[0]) n_wb_bp++;
    if (dut.g_kernel[0].u_kernel.u_epoch_gen.state == 2'd3 &&
        !dut.g_kernel[0].u_kernel.u_epoch_gen.active) n_transient++;
    if (dut.g_kernel[0].u_kernel.g_mod[0].u_compute.fire &&
        dut.g_kernel[0].u_kernel.g_mod[0].u_compute.buf_rd_addr == '1) n_buf_wrap++;
    if (dut.g_kernel[0].u_kernel.g_mod[0].u_compute.fire &&
        !dut.g_kernel[0].u_kernel.g_mod[0].u_compute.cell_valid) n_band_edge++;
    if (dut.g_kernel[0].u_kernel.pch_valid[2] && dut.g_kernel[0].u_kernel.pch_ready[2]) n_forward++;
  end

  int checks = 0, failures = 0;

  task automatic need(string what, int n);
    checks++;
    $display("%-34s %0d", what, n);
    if (n == 0) begin failures++; $display("  never happened"); end
  endtask

  initial begin
    int tc, tf;
    start = 0; load_patterns = 0; n_epochs = NEP; blk_now = 0;
    n_cm_stall = 0; n_eq_full = 0; n_pq_full = 0; n_res_full = 0; n_wb_bp = 0;
    n_transient = 0; n_buf_wrap = 0; n_band_edge = 0; n_forward = 0; n_reuse = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      @(posedge clk);
      blk_now = b;
      start <= 1'b1; load_patterns <= (b == 0);
      @(posedge clk);
      start <= 1'b0;
      @(posedge clk iff done);
      if (b > 0) n_reuse++;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (writes[r] != (b + 1) * NEP * NP) begin
          failures++;
          $display("kernel %0d block %0d: %0d writes", r, b, writes[r]);
        end
      end
    end
    need("compute-module stalls", n_cm_stall);
    need("epoch queue full", n_eq_full);
    need("pattern queue full", n_pq_full);
    need("DTW result queue full", n_res_full);
    need("write-back back-pressure", n_wb_bp);
    need("epoch start/end transient slots", n_transient);
    need("dtw_buff pointer wrap", n_buf_wrap);
    need("band cells outside the epoch", n_band_edge);
    need("patterns forwarded to module 2", n_forward);
    need("blocks reusing stored patterns", n_reuse);
    tc = checks; tf = failures;
    for (int r = 0; r < NR; r++) begin tc += dchecks[r]; tf += dfail[r]; end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
