// cdtw_accel_full_tb: the accelerator with every parameter at its default
// (24 kernels, epochs of 1024 samples, stride 256, four computation modules
// per kernel, W = 16, 32 patterns) running one block of 4 epochs per kernel,
// i.e. one epoch per computation module: 96 epochs x 32 patterns = 3072 cDTW
// distances, each checked against the reference. It also checks that a
// computation module with its queues kept filled finishes an epoch in exactly
// E*(2W+1)*NP = 1,081,344 cycles (one band cell per clock).
module cdtw_accel_full_tb;
  import cdtw_pkg::*;
  localparam int NR = 24, E = 1024, W = 16, NP = 32, STRIDE = 256, NE_MAX = 512, NEP = 4;
  localparam int ADDR_W = $clog2(NP * NE_MAX);
  localparam int CELLS  = E * (2 * W + 1) * NP;

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

  cdtw_accel dut (
    .clk, .rst_n, .start, .n_epochs, .load_patterns, .busy, .done,
    .sig_valid, .sig_ready, .sig_data, .est_valid, .est_ready, .est_data,
    .q_valid, .q_ready, .q_data, .pst_valid, .pst_ready, .pst_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  for (genvar r = 0; r < NR; r++) begin : g_drv
    kernel_driver #(.E(E), .W(W), .NP(NP), .STRIDE(STRIDE), .NEP(NEP), .NBLK(1),
                    .SQ_SHIFT(11), .ADDR_W(ADDR_W), .GAPS(1'b0), .SEED(101 + r)) drv (
      .clk, .rst_n, .blk_now,
      .sig_valid(sig_valid[r]), .sig_ready(sig_ready[r]), .sig_data(sig_data[r]),
      .est_valid(est_valid[r]), .est_ready(est_ready[r]), .est_data(est_data[r]),
      .q_valid(q_valid[r]), .q_ready(q_ready[r]), .q_data(q_data[r]),
      .pst_valid(pst_valid[r]), .pst_ready(pst_ready[r]), .pst_data(pst_data[r]),
      .wr_valid(wr_valid[r]), .wr_ready(wr_ready[r]), .wr_addr(wr_addr[r]),
      .wr_data(wr_data[r]),
      .checks(dchecks[r]), .failures(dfail[r]), .writes(writes[r]));
  end

  // epoch time of computation module 0 of kernel 0
  longint cyc, first_issue, epoch_end;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.g_kernel[0].u_kernel.g_mod[0].u_compute.fire && first_issue < 0) first_issue <= cyc;
    if (dut.g_kernel[0].u_kernel.g_mod[0].u_compute.epoch_done && epoch_end < 0) epoch_end <= cyc;
  end

  int checks = 0, failures = 0;

  initial begin
    int tc, tf;
    cyc = 0; first_issue = -1; epoch_end = -1;
    start = 0; load_patterns = 0; n_epochs = NEP; blk_now = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1'b1; load_patterns <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk iff done);
    $display("block done after %0d cycles", cyc);
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (writes[r] != NEP * NP) begin
        failures++;
        $display("kernel %0d: %0d writes", r, writes[r]);
      end
    end
    checks++;
    $display("module 0 epoch: %0d cycles (expected %0d)", epoch_end - first_issue + 1, CELLS);
    if (epoch_end - first_issue + 1 != CELLS) failures++;
    tc = checks; tf = failures;
    for (int r = 0; r < NR; r++) begin tc += dchecks[r]; tf += dfail[r]; end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
