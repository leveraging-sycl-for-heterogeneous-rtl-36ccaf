// pattern_gen: pattern generation module (PatternReader) of a basic kernel.
//
// Load phase (when load_patterns is set at start): for each of the NP patterns
// its statistics word and then its E samples are read from memory, every
// sample is z-normalised on the fly and stored in the on-chip pattern memory
// (NP x E words). The patterns are read from memory only once per block.
// Send phase: the patterns are streamed to the first computation module
// element-interleaved - sample 0 of all NP patterns, then sample 1 of all, ...
// - and the whole sequence is repeated n_rounds times, once for every epoch
// each computation module processes (n_epochs / PEP at the kernel level).
// With load_patterns clear the previously loaded patterns are reused.
//
// Interface: start (while idle) with load_patterns and n_rounds; q_* is the
// query (pattern samples, pattern after pattern), pst_* the per-pattern
// statistics; out_* feeds the pattern queue. done pulses at the end.
// Timing: load takes NP*(E+1) cycles without stalls; sending delivers one
// value per cycle through a registered read port of the pattern memory.
module pattern_gen
  import cdtw_pkg::*;
#(
  parameter int E      = 1024,
  parameter int NP     = 32,
  parameter int NR_MAX = 128     // most rounds per block
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        load_patterns,
  input  logic [$clog2(NR_MAX+1)-1:0] n_rounds,
  output logic                        busy,
  output logic                        done,
  input  logic                        q_valid,
  output logic                        q_ready,
  input  sample_t                     q_data,
  input  logic                        pst_valid,
  output logic                        pst_ready,
  input  stat_t                       pst_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output znorm_t                      out_data
);
  localparam int RW = $clog2(NR_MAX + 1);
  localparam int JW = $clog2(E);
  localparam int MW = (NP > 1) ? $clog2(NP) : 1;
  localparam int AW = $clog2(NP * E);

  typedef enum logic [1:0] {IDLE, LSTAT, LSAMP, SEND} state_t;
  state_t        state;
  znorm_t        pmem [NP * E];
  stat_t         st;
  znorm_t        z;
  logic [RW-1:0] nr, r;
  logic [JW-1:0] j;
  logic [MW-1:0] m;
  logic          last_m, last_j, more, adv;

  assign last_m    = (m == MW'(NP - 1));
  assign last_j    = (j == JW'(E - 1));
  assign pst_ready = (state == LSTAT);
  assign q_ready   = (state == LSAMP);
  assign busy      = (state != IDLE);
  assign more      = (r < nr);
  assign adv       = (state == SEND) && more && (!out_valid || out_ready);

  function automatic logic [AW-1:0] addr(logic [MW-1:0] mi, logic [JW-1:0] ji);
    return AW'(mi) * AW'(E) + AW'(ji);
  endfunction

  znorm u_znorm (.x(q_data), .st(st), .z(z));

  always_ff @(posedge clk) begin
    if (pst_ready && pst_valid) st <= pst_data;
    if (q_ready && q_valid)     pmem[addr(m, j)] <= z;
    if (adv)                    out_data <= pmem[addr(m, j)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      nr        <= '0;
      r         <= '0;
      j         <= '0;
      m         <= '0;
      out_valid <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          nr    <= n_rounds;
          r     <= '0;
          j     <= '0;
          m     <= '0;
          state <= load_patterns ? LSTAT : SEND;
        end
        LSTAT: if (pst_valid) state <= LSAMP;
        LSAMP: if (q_valid) begin
          if (!last_j) j <= j + 1'b1;
          else begin
            j <= '0;
            if (!last_m) begin
              m     <= m + 1'b1;
              state <= LSTAT;
            end else begin
              m     <= '0;
              state <= SEND;
            end
          end
        end
        SEND: begin
          if (out_valid && out_ready) out_valid <= 1'b0;
          if (adv) begin
            out_valid <= 1'b1;
            if (!last_m) m <= m + 1'b1;
            else begin
              m <= '0;
              if (!last_j) j <= j + 1'b1;
              else begin
                j <= '0;
                r <= r + 1'b1;
              end
            end
          end else if (!more && (!out_valid || out_ready)) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
