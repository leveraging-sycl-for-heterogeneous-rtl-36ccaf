// cdtw_compute_harness: drives one cdtw_compute instance for NEPOCH epochs and
// checks every result against the reference cDTW. With GAPS set the input
// queues run dry and the output queues refuse data at random, so all stall
// paths of the module are taken; without it the module must issue one cell
// per cycle, which is checked.
module cdtw_compute_harness
  import cdtw_pkg::*;
  import cdtw_ref_pkg::*;
#(
  parameter int E = 6, parameter int W = 2, parameter int NP = 4,
  parameter int SQ_SHIFT = 0, parameter int NEPOCH = 1,
  parameter bit FIG = 1'b0, parameter bit GAPS = 1'b0, parameter int SEED = 1,
  parameter int AMP = 8
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done,
  output int   n_stalls
);
  localparam int B = 2 * W + 1;
  int ep_vals [NEPOCH][E];
  int pat_vals[NP][E];
  longint expv[NEPOCH][NP];

  logic ep_valid, ep_ready, pat_valid, pat_ready, po_valid, po_ready, res_valid, res_ready;
  znorm_t ep_data, pat_data, po_data;
  cost_t res_data;
  logic stall, epoch_done;

  cdtw_compute #(.E(E), .W(W), .NP(NP), .SQ_SHIFT(SQ_SHIFT), .FORWARD(1'b1), .RES_DEPTH(NP)) dut (
    .clk, .rst_n,
    .ep_valid, .ep_ready, .ep_data,
    .pat_valid, .pat_ready, .pat_data,
    .patout_valid(po_valid), .patout_ready(po_ready), .patout_data(po_data),
    .res_valid, .res_ready, .res_data,
    .stall, .epoch_done);

  int ep_idx, pat_idx, po_idx, res_idx;
  int seed;
  logic gap_e, gap_p, gap_o, gap_r;

  initial begin
    int fig_e[6] = '{1, 3, 2, 1, 2, 2};
    int fig_p[6] = '{3, 1, 4, 4, 1, 1};
    seed = SEED;
    for (int q = 0; q < NEPOCH; q++)
      for (int j = 0; j < E; j++) ep_vals[q][j] = $signed($urandom(seed + q * 7919 + j) % (2 * AMP + 1)) - AMP;
    for (int m = 0; m < NP; m++)
      for (int j = 0; j < E; j++) pat_vals[m][j] = $signed($urandom(seed * 31 + m * 104729 + j) % (2 * AMP + 1)) - AMP;
    if (FIG) for (int j = 0; j < 6; j++) begin
      ep_vals[0][j]  = fig_e[j];
      pat_vals[0][j] = fig_p[j];
    end
    for (int q = 0; q < NEPOCH; q++)
      for (int m = 0; m < NP; m++) begin
        int ev[], pv[];
        ev = new[E]; pv = new[E];
        for (int j = 0; j < E; j++) begin ev[j] = ep_vals[q][j]; pv[j] = pat_vals[m][j]; end
        expv[q][m] = ref_cdtw(ev, pv, E, W, SQ_SHIFT);
      end
  end

  // data streams: epochs in order; patterns element-interleaved, once per epoch
  assign ep_valid  = (ep_idx < NEPOCH * E) && !gap_e;
  assign ep_data   = znorm_t'(ep_vals[ep_idx / E][ep_idx % E]);
  assign pat_valid = (pat_idx < NEPOCH * E * NP) && !gap_p;
  assign pat_data  = znorm_t'(pat_vals[pat_idx % NP][(pat_idx / NP) % E]);
  assign po_ready  = !gap_o;
  assign res_ready = !gap_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ep_idx <= 0; pat_idx <= 0; po_idx <= 0; res_idx <= 0;
      checks <= 0; failures <= 0; n_stalls <= 0;
      gap_e <= 0; gap_p <= 0; gap_o <= 0; gap_r <= 0;
    end else begin
      if (GAPS) begin
        gap_e <= ($urandom % 4) == 0;
        gap_p <= ($urandom % 8) == 0;
        gap_o <= ($urandom % 8) == 0;
        gap_r <= ($urandom % 2) == 0;
      end
      if (stall) n_stalls <= n_stalls + 1;
      if (ep_valid && ep_ready) ep_idx <= ep_idx + 1;
      if (pat_valid && pat_ready) pat_idx <= pat_idx + 1;
      if (po_valid && po_ready) begin
        po_idx <= po_idx + 1;
        checks <= checks + 1;
        if (po_data != znorm_t'(pat_vals[po_idx % NP][(po_idx / NP) % E])) begin
          failures <= failures + 1;
          $display("forwarded pattern %0d wrong", po_idx);
        end
      end
      if (res_valid && res_ready) begin
        automatic int q = res_idx / NP;
        automatic int m = res_idx % NP;
        res_idx <= res_idx + 1;
        if (res_data != to_cost(expv[q][m])) begin
          failures <= failures + 1;
          $display("epoch %0d pattern %0d: got %0d expected %0d", q, m, res_data, expv[q][m]);
        end
        if (po_valid && po_ready) checks <= checks + 2;
        else checks <= checks + 1;
      end
    end
  end

  assign done = (res_idx == NEPOCH * NP) && (po_idx == NEPOCH * E * NP);
endmodule
