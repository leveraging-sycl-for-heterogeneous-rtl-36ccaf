// epoch_gen_tb: E = 16, STRIDE = 4 (four epoch queues), one block of 8 epochs
// with random gaps on the inputs and random back-pressure on each queue.
// Queue s must receive epochs s and s+4, each as its 16 samples normalised
// with that epoch's own statistics; the signal must be read exactly once and
// one statistics word per epoch.
module epoch_gen_tb;
  import cdtw_pkg::*;
  import cdtw_ref_pkg::*;
  localparam int E = 16, STRIDE = 4, PEP = 4, NE_MAX = 16, NEP = 8;
  localparam int NSIG = (NEP + PEP - 1) * STRIDE;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, sig_valid, sig_ready, st_valid, st_ready;
  logic [$clog2(NE_MAX+1)-1:0] n_epochs;
  sample_t sig_data;
  stat_t st_data;
  logic [PEP-1:0] out_valid, out_ready;
  znorm_t out_data;

  epoch_gen #(.E(E), .STRIDE(STRIDE), .NE_MAX(NE_MAX)) dut (.*);

  sample_t sig [NSIG];
  stat_t   est [NEP];
  int si, ei, got [PEP];
  int checks = 0, failures = 0;
  logic g1, g2;

  assign sig_valid = (si < NSIG) && !g1;
  assign sig_data  = sig[si % NSIG];
  assign st_valid  = (ei < NEP) && !g2;
  assign st_data   = est[ei % NEP];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      si <= 0; ei <= 0; g1 <= 0; g2 <= 0; out_ready <= '0;
      for (int s = 0; s < PEP; s++) got[s] <= 0;
    end else begin
      g1 <= ($urandom % 4) == 0;
      g2 <= ($urandom % 2) == 0;
      out_ready <= PEP'($urandom);
      if (sig_valid && sig_ready) si <= si + 1;
      if (st_valid && st_ready) ei <= ei + 1;
      for (int s = 0; s < PEP; s++)
        if (out_valid[s] && out_ready[s]) begin
          automatic int q = s + PEP * (got[s] / E);
          automatic int j = got[s] % E;
          automatic int e = ref_z(int'(sig[q * STRIDE + j]), int'(est[q].mean), int'(est[q].inv_std));
          got[s] <= got[s] + 1;
          checks++;
          if (int'(out_data) != e) begin
            failures++;
            $display("queue %0d epoch %0d sample %0d: %0d expected %0d", s, q, j, out_data, e);
          end
        end
      if ($countones(out_valid) > 1) begin failures++; $display("two queues written at once"); end
    end
  end

  initial begin
    for (int i = 0; i < NSIG; i++) sig[i] = sample_t'($signed($urandom % 4001) - 2000);
    for (int q = 0; q < NEP; q++) begin
      est[q].mean = sample_t'($signed($urandom % 201) - 100);
      est[q].inv_std = INV_W'(50000 + $urandom % 200000);
    end
    start = 0; n_epochs = NEP;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    @(posedge clk iff done);
    repeat (2) @(posedge clk);
    for (int s = 0; s < PEP; s++) begin
      checks++;
      if (got[s] != (NEP / PEP) * E) begin failures++; $display("queue %0d got %0d", s, got[s]); end
    end
    checks++;
    if (si != NSIG || ei != NEP) begin failures++; $display("read %0d samples %0d stats", si, ei); end
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
