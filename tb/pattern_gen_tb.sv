// pattern_gen_tb: E = 8, NP = 4. First block loads the patterns (statistics
// word, then samples, pattern by pattern) and sends them 3 times, sample 0 of
// every pattern first; the second block reuses the stored patterns for one
// more round without reading the query. Random gaps and back-pressure.
module pattern_gen_tb;
  import cdtw_pkg::*;
  import cdtw_ref_pkg::*;
  localparam int E = 8, NP = 4, NR_MAX = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, load_patterns, busy, done, q_valid, q_ready, pst_valid, pst_ready;
  logic out_valid, out_ready;
  logic [$clog2(NR_MAX+1)-1:0] n_rounds;
  sample_t q_data;
  stat_t pst_data;
  znorm_t out_data;

  pattern_gen #(.E(E), .NP(NP), .NR_MAX(NR_MAX)) dut (.*);

  sample_t pat [NP][E];
  stat_t   pst [NP];
  int qi, pi, got;
  int checks = 0, failures = 0;
  logic g1, g2;

  assign q_valid   = (qi < NP * E) && !g1;
  assign q_data    = pat[(qi / E) % NP][qi % E];
  assign pst_valid = (pi < NP) && !g2;
  assign pst_data  = pst[pi % NP];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      qi <= 0; pi <= 0; got <= 0; g1 <= 0; g2 <= 0; out_ready <= 0;
    end else begin
      g1 <= ($urandom % 4) == 0;
      g2 <= ($urandom % 2) == 0;
      out_ready <= ($urandom % 3) != 0;
      if (q_valid && q_ready) qi <= qi + 1;
      if (pst_valid && pst_ready) begin
        pi <= pi + 1;
        checks++;
        if (qi != pi * E) begin failures++; $display("statistics read out of order"); end
      end
      if (out_valid && out_ready) begin
        automatic int m = got % NP;
        automatic int j = (got / NP) % E;
        automatic int e = ref_z(int'(pat[m][j]), int'(pst[m].mean), int'(pst[m].inv_std));
        got <= got + 1;
        checks++;
        if (int'(out_data) != e) begin
          failures++;
          $display("value %0d (pattern %0d sample %0d): %0d expected %0d", got, m, j, out_data, e);
        end
      end
    end
  end

  task automatic run(bit load, int rounds);
    @(posedge clk); start <= 1; load_patterns <= load; n_rounds <= rounds;
    @(posedge clk); start <= 0;
    @(posedge clk iff done);
  endtask

  initial begin
    for (int m = 0; m < NP; m++) begin
      for (int j = 0; j < E; j++) pat[m][j] = sample_t'($signed($urandom % 2001) - 1000);
      pst[m].mean = sample_t'($signed($urandom % 101) - 50);
      pst[m].inv_std = INV_W'(30000 + $urandom % 100000);
    end
    start = 0; load_patterns = 0; n_rounds = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1'b1, 3);
    checks++;
    if (got != 3 * NP * E) begin failures++; $display("block 1 sent %0d", got); end
    run(1'b0, 1);
    checks++;
    if (got != 4 * NP * E) begin failures++; $display("block 2 sent %0d", got); end
    checks++;
    if (qi != NP * E || pi != NP) begin failures++; $display("query read %0d, stats %0d", qi, pi); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
