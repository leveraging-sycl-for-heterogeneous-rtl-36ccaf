// result_wb_tb: NP = 4 results per epoch, PEP = 4 queues, a block of 8 epochs.
// Queue s holds the results of epochs s and s+4 (value = 100*epoch + pattern)
// and presents them with random gaps; the memory port applies random
// back-pressure. Every result must be written once, at address
// pattern * n_epochs + epoch.
module result_wb_tb;
  import cdtw_pkg::*;
  localparam int NP = 4, PEP = 4, NE_MAX = 16, NEP = 8;
  localparam int ADDR_W = $clog2(NP * NE_MAX);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, wr_valid, wr_ready;
  logic [$clog2(NE_MAX+1)-1:0] n_epochs;
  logic [PEP-1:0] res_valid, res_ready;
  cost_t res_data [PEP];
  logic [ADDR_W-1:0] wr_addr;
  cost_t wr_data;

  result_wb #(.NP(NP), .PEP(PEP), .NE_MAX(NE_MAX)) dut (.*);

  int sent [PEP];
  bit seen [NP * NEP];
  int writes;
  logic [PEP-1:0] gap;
  int checks = 0, failures = 0;

  for (genvar s = 0; s < PEP; s++) begin : g_q
    assign res_valid[s] = (sent[s] < (NEP / PEP) * NP) && !gap[s];
    assign res_data[s]  = cost_t'(100 * (s + PEP * (sent[s] / NP)) + sent[s] % NP);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < PEP; s++) sent[s] <= 0;
      gap <= '0; wr_ready <= 0; writes <= 0;
    end else begin
      gap <= PEP'($urandom);
      wr_ready <= ($urandom % 3) != 0;
      for (int s = 0; s < PEP; s++) if (res_valid[s] && res_ready[s]) sent[s] <= sent[s] + 1;
      if (wr_valid && wr_ready) begin
        automatic int q = int'(wr_data) / 100;
        automatic int m = int'(wr_data) % 100;
        writes <= writes + 1;
        checks++;
        if (int'(wr_addr) != m * NEP + q || seen[wr_addr]) begin
          failures++;
          $display("result epoch %0d pattern %0d written to %0d", q, m, wr_addr);
        end
        seen[wr_addr] <= 1'b1;
      end
    end
  end

  initial begin
    for (int i = 0; i < NP * NEP; i++) seen[i] = 0;
    start = 0; n_epochs = NEP;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    @(posedge clk iff done);
    @(posedge clk);
    checks++;
    if (writes != NP * NEP) begin failures++; $display("%0d writes", writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
