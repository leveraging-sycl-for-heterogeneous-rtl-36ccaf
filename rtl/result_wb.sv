// result_wb: result write-back module of a basic kernel.
//
// Computation module s delivers, for each of its epochs in turn, the NP cDTW
// distances of that epoch (pattern 0 first). Epoch q of the block was
// computed by module q mod PEP. The write-back visits the epochs in order,
// takes the NP results of epoch q from that module's DTW queue and writes them
// pattern-major: address m * n_epochs + q, i.e. all epochs of pattern 0,
// then all epochs of pattern 1, and so on. Results are written one by one.
//
// Interface: start (while idle) with n_epochs; res_*[s] are the DTW queues;
// wr_* is the memory write port (valid/ready, address in result words
// relative to the block). done pulses after the last write.
// Timing: one result per cycle when the memory accepts and the queue holds
// data; the path from queue to write port is combinational.
module result_wb
  import cdtw_pkg::*;
#(
  parameter int NP     = 32,
  parameter int PEP    = 4,
  parameter int NE_MAX = 512,
  parameter int ADDR_W = $clog2(NP * NE_MAX)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [$clog2(NE_MAX+1)-1:0] n_epochs,
  output logic                        busy,
  output logic                        done,
  input  logic [PEP-1:0]              res_valid,
  output logic [PEP-1:0]              res_ready,
  input  cost_t                       res_data [PEP],
  output logic                        wr_valid,
  input  logic                        wr_ready,
  output logic [ADDR_W-1:0]           wr_addr,
  output cost_t                       wr_data
);
  localparam int NW = $clog2(NE_MAX + 1);
  localparam int MW = (NP > 1) ? $clog2(NP) : 1;
  localparam int SW = (PEP > 1) ? $clog2(PEP) : 1;

  logic              run;
  logic [NW-1:0]     ne, q;
  logic [MW-1:0]     m;
  logic [SW-1:0]     s;
  logic [ADDR_W-1:0] addr;
  logic              fire;

  assign busy     = run;
  assign wr_valid = run && res_valid[s];
  assign wr_data  = res_data[s];
  assign wr_addr  = addr;
  assign fire     = wr_valid && wr_ready;

  always_comb begin
    res_ready = '0;
    res_ready[s] = run && wr_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      ne   <= '0;
      q    <= '0;
      m    <= '0;
      s    <= '0;
      addr <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run  <= (n_epochs != '0);
          done <= (n_epochs == '0);
          ne   <= n_epochs;
          q    <= '0;
          m    <= '0;
          s    <= '0;
          addr <= '0;
        end
      end else if (fire) begin
        if (m != MW'(NP - 1)) begin
          m    <= m + 1'b1;
          addr <= addr + ADDR_W'(ne);
        end else begin
          m    <= '0;
          addr <= ADDR_W'(q) + 1'b1;
          s    <= (s == SW'(PEP - 1)) ? '0 : s + 1'b1;
          q    <= q + 1'b1;
          if (q == ne - 1'b1) begin
            run  <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end
endmodule
