// cdtw_compute_tb: self-checking test of the computation module.
//  * h_fig: the 6-sample example (band half-width 2) whose cDTW distance is 9,
//    with three random patterns interleaved beside it; inputs never stall, so
//    the module must compute one band cell per clock (E*B*NP cycles/epoch).
//  * h_rnd: 3 epochs of 40 samples, W = 4, 8 patterns, full-range values with
//    the default square scaling, random input gaps and output back-pressure.
module cdtw_compute_tb;
  import cdtw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int c1, f1, c2, f2, s1, s2;
  logic d1, d2;
  int checks, failures;

  cdtw_compute_harness #(.E(6), .W(2), .NP(4), .SQ_SHIFT(0), .NEPOCH(2), .FIG(1'b1),
                         .GAPS(1'b0), .SEED(3), .AMP(5))
    h_fig (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1), .n_stalls(s1));
  cdtw_compute_harness #(.E(40), .W(4), .NP(8), .SQ_SHIFT(11), .NEPOCH(3), .FIG(1'b0),
                         .GAPS(1'b1), .SEED(11), .AMP(30000))
    h_rnd (.clk, .rst_n, .checks(c2), .failures(f2), .done(d2), .n_stalls(s2));

  // cycle count of the stall-free instance: from the first cell to the last
  int first_cyc, last_cyc, cyc;
  int extra_checks, extra_fail;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (h_fig.pat_valid && h_fig.pat_ready && h_fig.pat_idx == 0) first_cyc <= cyc;
    if (h_fig.epoch_done && last_cyc < 0) last_cyc <= cyc;
  end

  initial begin
    cyc = 0; first_cyc = -1; last_cyc = -1; extra_checks = 0; extra_fail = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d1 && d2);
    repeat (5) @(posedge clk);
    // example from the text: distance 9
    extra_checks++;
    if (h_fig.expv[0][0] != 9) begin extra_fail++; $display("reference of example is %0d", h_fig.expv[0][0]); end
    // one cell per cycle: 6 rows * 5 cells * 4 patterns, first to last cell
    extra_checks++;
    if (last_cyc - first_cyc != 6 * 5 * 4 - 1) begin
      extra_fail++;
      $display("epoch took %0d cycles, expected %0d", last_cyc - first_cyc + 1, 6 * 5 * 4);
    end
    extra_checks++;
    if (s2 == 0) begin extra_fail++; $display("random instance never stalled"); end
    checks   = c1 + c2 + extra_checks;
    failures = f1 + f2 + extra_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end
endmodule
