// cdtw_compute: computation module (DTWProcessor) of a basic kernel.
//
// Computes the constrained DTW (Sakoe-Chiba band of half-width W) between one
// z-normalised epoch of length E and NP patterns at the same time, one band
// cell per clock. The cost matrix is walked row by row (row i = pattern
// sample P[i]); each row holds the B = 2W+1 band cells j = i-W .. i+W
// (band index k = j-i+W), and every cell is computed for all NP patterns in
// turn before moving to the next cell. This interleaving makes the cell that
// a new cell depends on (its West neighbour) exactly NP cycles old, which
// hides the pipeline latency: the module needs NP > LAT.
//
//   x(i,j) = (P[i]-E[j])^2 + min( NW = x(i-1,j-1), N = x(i-1,j), W = x(i,j-1) )
//
// Cells outside 0 <= j < E hold infinity; x(0,0) = d(0,0).
//
// Storage, after the document's computation-module figure:
//   * epoch band window: the B epoch samples E[i-W .. i+W] of the current row
//     with a valid bit each (invalid = outside the epoch). At the end of every
//     row it shifts by one and takes the next epoch sample from the epoch
//     queue, so each epoch sample is read exactly once. (This design indexes
//     the window with a multiplexer; the document rotates a circular shift
//     register instead.)
//   * vpat[NP]: the current pattern sample of each pattern. It is loaded from
//     the pattern queue during the k = 0 cell of each pattern and, when FORWARD
//     is set, the same value is sent on to the next module's pattern queue.
//   * dtw_buff: a circular buffer of (B-1)*NP results (1024 at the defaults,
//     so its pointer is a plain 10-bit counter). Read at issue it returns the
//     result of (B-1)*NP cells ago, which is the North neighbour x(i-1,j).
//   * wreg[NP]: last result of each pattern, the West neighbour.
//   * nwreg[NP]: last dtw_buff word read for each pattern; it is the North of
//     the previous cell, i.e. the North-West neighbour of the current one.
//
// Pipeline (LAT = 3): issue (operand select) -> stage 1 (difference,
// min of three) -> stage 2 (square) -> saturating add, written back to
// dtw_buff / wreg and, for the last cell x(E-1,E-1) of each pattern, pushed
// into the DTW result queue (RES_DEPTH entries, NP at the defaults).
//
// Flow control is data-driven: issue stalls while the next epoch sample or the
// next pattern sample is not available, while the forwarded pattern queue is
// full, or while the result queue could overflow. A stall only delays cells,
// because the buffers are indexed by cell count, not by cycle. After the last
// row the module clears its window and waits for the next epoch.
// Per epoch: NP results after E*B*NP issued cells (E*B*NP cycles without stalls).
// patout_data is wired straight to pat_data: a pattern sample enters the
// next module's queue in the same cycle it is taken from this one, so no
// extra register is spent on forwarding.
module cdtw_compute
  import cdtw_pkg::*;
#(
  parameter int E         = 1024,  // epoch / pattern length
  parameter int W         = 16,    // Sakoe-Chiba warping window
  parameter int NP        = 32,    // interleaved patterns
  parameter int SQ_SHIFT  = 11,    // fraction bits dropped from the square
  parameter bit FORWARD   = 1'b1,  // send pattern samples to the next module
  parameter int RES_DEPTH = 32     // DTW result queue depth
) (
  input  logic   clk,
  input  logic   rst_n,
  // epoch queue (input)
  input  logic   ep_valid,
  output logic   ep_ready,
  input  znorm_t ep_data,
  // pattern queue in
  input  logic   pat_valid,
  output logic   pat_ready,
  input  znorm_t pat_data,
  // pattern queue out (to the next module)
  output logic   patout_valid,
  input  logic   patout_ready,
  output znorm_t patout_data,
  // DTW result queue (output)
  output logic   res_valid,
  input  logic   res_ready,
  output cost_t  res_data,
  // status
  output logic   stall,           // a cell could not issue this cycle
  output logic   epoch_done       // last cell of an epoch issued
);
  localparam int B    = 2 * W + 1;
  localparam int LBUF = (B - 1) * NP;
  localparam int LAT  = 3;
  localparam int IW   = $clog2(E);
  localparam int KW   = $clog2(B);
  localparam int MW   = (NP > 1) ? $clog2(NP) : 1;
  localparam int AW   = $clog2(LBUF);
  localparam int CW   = $clog2(RES_DEPTH + 1);

  // ---------------------------------------------------------------- control
  typedef enum logic {PRELOAD, RUN} state_t;
  state_t        state;
  logic [IW-1:0] row;
  logic [KW-1:0] kk;
  logic [MW-1:0] mm;
  logic [KW-1:0] pre_cnt;

  znorm_t        win  [B];
  logic [B-1:0]  winv;
  znorm_t        vpat [NP];
  cost_t         wreg [NP];
  cost_t         nwreg[NP];

  logic last_m, last_k, last_row, out_cell;
  logic need_ep;      // the row after this one takes a new epoch sample
  logic res_space;
  logic ok_pat, ok_ep, ok_res, fire, pre_pop;

  assign last_m   = (mm == MW'(NP - 1));
  assign last_k   = (kk == KW'(B - 1));
  assign last_row = (row == IW'(E - 1));
  assign out_cell = last_row && (kk == KW'(W));
  assign need_ep  = !last_row && (int'(row) + 1 + W <= E - 1);

  // ------------------------------------------------------- result queue
  logic [CW-1:0] res_count;
  logic          res_push;
  cost_t         res_push_data;
  logic [LAT-1:0] inflight_out;
  logic [CW:0]   res_used;

  always_comb begin
    res_used = {1'b0, res_count};
    for (int s = 0; s < LAT; s++) res_used += (CW + 1)'(inflight_out[s]);
  end
  assign res_space = (res_used < (CW + 1)'(RES_DEPTH));

  // ------------------------------------------------------- issue conditions
  assign ok_pat = (kk != '0) || (pat_valid && (!FORWARD || patout_ready));
  assign ok_ep  = !(last_m && last_k) || !need_ep || ep_valid;
  assign ok_res = !out_cell || res_space;
  assign fire   = (state == RUN) && ok_pat && ok_ep && ok_res;
  assign pre_pop = (state == PRELOAD) && ep_valid;

  assign stall      = (state == RUN) && !fire;
  assign epoch_done = fire && last_row && last_k && last_m;

  assign ep_ready     = pre_pop || (fire && last_m && last_k && need_ep);
  assign pat_ready    = fire && (kk == '0);
  assign patout_valid = FORWARD && (state == RUN) && (kk == '0) && pat_valid &&
                        ok_ep && ok_res;
  assign patout_data  = pat_data;

  // --------------------------------------------------------- dtw_buff
  cost_t         buf_rd;
  logic [AW-1:0] buf_rd_addr;
  logic          buf_we;
  logic [AW-1:0] buf_wa;
  cost_t         buf_wd;

  circ_buffer #(.W(COST_W), .LEN(LBUF)) u_dtw_buff (
    .clk, .rst_n,
    .clear  (1'b0),
    .shift  (fire),
    .rd_data(buf_rd),
    .rd_addr(buf_rd_addr),
    .wr_en  (buf_we),
    .wr_addr(buf_wa),
    .wr_data(buf_wd)
  );

  // -------------------------------------------------------- operand select
  znorm_t e_op, p_op;
  logic   cell_valid, first_cell;
  cost_t  n_op, nw_op, w_op;

  always_comb begin
    e_op       = win[kk];
    cell_valid = winv[kk];
    p_op       = (kk == '0) ? pat_data : vpat[mm];
    first_cell = (row == '0) && (kk == KW'(W));
    n_op       = (last_k || row == '0) ? COST_INF : buf_rd;
    nw_op      = (row == '0) ? COST_INF : nwreg[mm];
    w_op       = (kk == '0) ? COST_INF : wreg[mm];
  end

  // ------------------------------------------------------------- pipeline
  typedef struct packed {
    logic          v;
    logic          cell_valid;
    logic          out;
    logic [MW-1:0] m;
    logic [AW-1:0] addr;
  } tag_t;

  tag_t                tag1, tag2;
  logic signed [Z_W:0] diff1;
  cost_t               min1, min2, sq2;
  logic signed [2*Z_W+1:0] sqs;
  logic [2*Z_W+1:0]        sqfull;

  assign sqs    = diff1 * diff1;
  assign sqfull = $unsigned(sqs);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag1 <= '0;
      tag2 <= '0;
    end else begin
      tag1 <= '{v: fire, cell_valid: cell_valid, out: out_cell, m: mm, addr: buf_rd_addr};
      tag2 <= tag1;
    end
  end

  always_ff @(posedge clk) begin
    diff1 <= $signed({e_op[Z_W-1], e_op}) - $signed({p_op[Z_W-1], p_op});
    min1  <= first_cell ? '0 : cost_min3(n_op, nw_op, w_op);
    min2  <= min1;
    sq2   <= ((sqfull >> SQ_SHIFT) > (2*Z_W+2)'(COST_INF)) ? COST_INF
                                                           : COST_W'(sqfull >> SQ_SHIFT);
  end

  cost_t result;
  assign result        = tag2.cell_valid ? cost_add(min2, sq2) : COST_INF;
  assign buf_we        = tag2.v;
  assign buf_wa        = tag2.addr;
  assign buf_wd        = result;
  assign res_push      = tag2.v && tag2.out;
  assign res_push_data = result;
  assign inflight_out  = {tag2.v && tag2.out, tag1.v && tag1.out, 1'b0};

  always_ff @(posedge clk) begin
    if (tag2.v) wreg[tag2.m] <= result;
    if (fire) begin
      nwreg[mm] <= buf_rd;
      if (kk == '0) vpat[mm] <= pat_data;
    end
  end

  // ----------------------------------------------------- counters, window
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= PRELOAD;
      row     <= '0;
      kk      <= '0;
      mm      <= '0;
      pre_cnt <= '0;
      winv    <= '0;
    end else if (pre_pop) begin
      winv    <= {1'b1, winv[B-1:1]};
      if (pre_cnt == KW'(W)) begin
        pre_cnt <= '0;
        state   <= RUN;
      end else begin
        pre_cnt <= pre_cnt + 1'b1;
      end
    end else if (fire) begin
      if (!last_m) mm <= mm + 1'b1;
      else begin
        mm <= '0;
        if (!last_k) kk <= kk + 1'b1;
        else begin
          kk <= '0;
          if (last_row) begin
            row   <= '0;
            state <= PRELOAD;
            winv  <= '0;
          end else begin
            row  <= row + 1'b1;
            winv <= {need_ep, winv[B-1:1]};
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (pre_pop || (fire && last_m && last_k && !last_row)) begin
      for (int b = 0; b < B - 1; b++) win[b] <= win[b+1];
      win[B-1] <= ep_data;
    end
  end

  sync_fifo #(.W(COST_W), .DEPTH(RES_DEPTH)) u_res_q (
    .clk, .rst_n,
    .in_valid (res_push),
    .in_ready (),
    .in_data  (res_push_data),
    .out_valid(res_valid),
    .out_ready(res_ready),
    .out_data (res_data),
    .count    (res_count)
  );

  initial begin
    assert (NP > LAT) else $fatal(1, "cdtw_compute: NP must exceed the pipeline latency");
    assert (E > W)    else $fatal(1, "cdtw_compute: E must exceed W");
  end
endmodule
