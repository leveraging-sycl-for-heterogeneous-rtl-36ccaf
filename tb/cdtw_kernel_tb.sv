// cdtw_kernel_tb: one basic kernel at reduced size (E = 32, STRIDE = 8, so
// four computation modules; W = 4; NP = 8), two blocks of 8 epochs: the first
// loads the patterns, the second reuses them. Random gaps on every input
// stream and random back-pressure on the write port. Every distance is
// checked against the reference, and so is the number of writes per block.
module cdtw_kernel_tb;
  import cdtw_pkg::*;
  localparam int E = 32, W = 4, NP = 8, STRIDE = 8, NE_MAX = 16, NEP = 8, NBLK = 2;
  localparam int ADDR_W = $clog2(NP * NE_MAX);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, load_patterns, busy, done;
  logic [$clog2(NE_MAX+1)-1:0] n_epochs;
  logic sig_valid, sig_ready, est_valid, est_ready, q_valid, q_ready, pst_valid, pst_ready;
  logic wr_valid, wr_ready;
  sample_t sig_data, q_data;
  stat_t est_data, pst_data;
  logic [ADDR_W-1:0] wr_addr;
  cost_t wr_data;
  int blk_now, dchecks, dfail, writes;

  cdtw_kernel #(.E(E), .W(W), .NP(NP), .STRIDE(STRIDE), .NE_MAX(NE_MAX), .SQ_SHIFT(11)) dut (
    .clk, .rst_n, .start, .n_epochs, .load_patterns, .busy, .done,
    .sig_valid, .sig_ready, .sig_data, .est_valid, .est_ready, .est_data,
    .q_valid, .q_ready, .q_data, .pst_valid, .pst_ready, .pst_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  kernel_driver #(.E(E), .W(W), .NP(NP), .STRIDE(STRIDE), .NEP(NEP), .NBLK(NBLK),
                  .SQ_SHIFT(11), .ADDR_W(ADDR_W), .GAPS(1'b1), .SEED(5)) drv (
    .clk, .rst_n, .blk_now,
    .sig_valid, .sig_ready, .sig_data, .est_valid, .est_ready, .est_data,
    .q_valid, .q_ready, .q_data, .pst_valid, .pst_ready, .pst_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data,
    .checks(dchecks), .failures(dfail), .writes);

  int checks = 0, failures = 0;

  initial begin
    start = 0; load_patterns = 0; n_epochs = NEP; blk_now = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      @(posedge clk);
      blk_now = b;
      start <= 1'b1; load_patterns <= (b == 0);
      @(posedge clk);
      start <= 1'b0;
      @(posedge clk iff done);
      checks++;
      if (writes != (b + 1) * NEP * NP) begin
        failures++;
        $display("block %0d: %0d writes, expected %0d", b, writes, (b + 1) * NEP * NP);
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("kernel still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks + dchecks, failures + dfail);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + dchecks, failures + dfail + 1);
    $finish;
  end
endmodule
