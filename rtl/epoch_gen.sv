// epoch_gen: epoch generation module (EpochReader) of a basic kernel.
//
// The signal is read from memory exactly once, sample by sample. Epochs of
// length E start every STRIDE samples, so each sample belongs to up to
// PEP = E/STRIDE overlapping epochs; computation module s of the kernel works
// on epochs s, s+PEP, s+2*PEP, ... of the block, which cover the contiguous
// stride blocks s .. s+n_epochs-1. For every sample the module therefore
// z-normalises it once for each active epoch, serially (one epoch per clock),
// with that epoch's own statistics, and pushes the value into that epoch's
// queue. The start-up (first PEP-1 stride blocks feed fewer epochs) and the
// wind-down (last PEP-1 blocks) transients follow from the same condition
// s <= block < s + n_epochs.
//
// Statistics (mean, inverse standard deviation) are precomputed by the host
// and read once per epoch, at the first stride block of the epoch; they are
// kept in PEP registers, slot s serving the epoch currently fed to module s.
//
// Interface: start (one cycle, while idle) with n_epochs (a multiple of PEP,
// at most NE_MAX) launches one block; sig_* is the signal stream, st_* the
// per-epoch statistics stream in epoch order; out_*[s] feed the epoch queues.
// done pulses after the last sample was delivered.
// Timing: 1 cycle per statistics word, 1 cycle per sample read and 1 cycle per
// (sample, module) pair, stalls aside: about (PEP+1) cycles per sample, far
// above the rate at which computation modules consume samples.
module epoch_gen
  import cdtw_pkg::*;
#(
  parameter int E      = 1024,
  parameter int STRIDE = 256,
  parameter int NE_MAX = 512,
  parameter int PEP    = E / STRIDE
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [$clog2(NE_MAX+1)-1:0] n_epochs,
  output logic                      busy,
  output logic                      done,
  input  logic                      sig_valid,
  output logic                      sig_ready,
  input  sample_t                   sig_data,
  input  logic                      st_valid,
  output logic                      st_ready,
  input  stat_t                     st_data,
  output logic [PEP-1:0]            out_valid,
  input  logic [PEP-1:0]            out_ready,
  output znorm_t                    out_data
);
  localparam int NW = $clog2(NE_MAX + 1);
  localparam int BW = $clog2(NE_MAX + PEP + 1);
  localparam int JW = $clog2(STRIDE);
  localparam int SW = (PEP > 1) ? $clog2(PEP) : 1;

  typedef enum logic [1:0] {IDLE, STAT, SAMPLE, EMIT} state_t;
  state_t        state;
  logic [NW-1:0] ne;
  logic [BW-1:0] blk;
  logic [SW-1:0] slot;     // blk mod PEP
  logic [JW-1:0] j;
  logic [SW-1:0] s;
  sample_t       x;
  stat_t         st_reg [PEP];
  logic          active, step, last_blk;

  assign active    = (BW'(s) <= blk) && (blk < BW'(s) + BW'(ne));
  assign last_blk  = (blk == BW'(ne) + BW'(PEP - 2));
  assign st_ready  = (state == STAT) && (blk < BW'(ne));
  assign sig_ready = (state == SAMPLE);
  assign step      = (state == EMIT) && (!active || out_ready[s]);
  assign busy      = (state != IDLE);

  always_comb begin
    out_valid = '0;
    if (state == EMIT && active) out_valid[s] = 1'b1;
  end

  znorm u_znorm (.x(x), .st(st_reg[s]), .z(out_data));

  always_ff @(posedge clk) begin
    if (st_ready && st_valid) st_reg[slot] <= st_data;
    if (sig_ready && sig_valid) x <= sig_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      ne    <= '0;
      blk   <= '0;
      slot  <= '0;
      j     <= '0;
      s     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          ne    <= n_epochs;
          blk   <= '0;
          slot  <= '0;
          j     <= '0;
          state <= STAT;
        end
        STAT: if (blk >= BW'(ne) || st_valid) state <= SAMPLE;
        SAMPLE: if (sig_valid) begin
          s     <= '0;
          state <= EMIT;
        end
        EMIT: if (step) begin
          if (s != SW'(PEP - 1)) s <= s + 1'b1;
          else if (j != JW'(STRIDE - 1)) begin
            j     <= j + 1'b1;
            state <= SAMPLE;
          end else begin
            j <= '0;
            if (last_blk) begin
              state <= IDLE;
              done  <= 1'b1;
            end else begin
              blk   <= blk + 1'b1;
              slot  <= (slot == SW'(PEP - 1)) ? '0 : slot + 1'b1;
              state <= STAT;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  initial assert (PEP * STRIDE == E) else $fatal(1, "epoch_gen: E must be a multiple of STRIDE");
endmodule
