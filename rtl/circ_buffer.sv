// circ_buffer: the long shift register dtw_buff of the computation module,
// built as a circular buffer in embedded RAM.
//
// Instead of moving LEN words on every shift, one counter points at the
// oldest word. A shift reads that word (the value written LEN shifts ago)
// and the counter moves on. When LEN is a power of two the counter has
// exactly log2(LEN) bits and wraps by itself; otherwise it is compared with
// LEN-1 and reset to zero, avoiding a modulo operation.
//
// Because the computation pipeline produces the new value a few cycles after
// the old one is read, the write side is a separate port: wr_en/wr_addr/
// wr_data write the slot that was read when that value's cell was issued
// (rd_addr is exported so the caller can carry it down its pipeline).
// Interface: shift = advance the read pointer; rd_data is the word at the
// pointer (combinational read). Timing: a write in cycle t is readable in t+1.
module circ_buffer #(
  parameter int W   = 32,
  parameter int LEN = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,     // restart the pointer at 0
  input  logic                   shift,
  output logic [W-1:0]           rd_data,
  output logic [$clog2(LEN)-1:0] rd_addr,
  input  logic                   wr_en,
  input  logic [$clog2(LEN)-1:0] wr_addr,
  input  logic [W-1:0]           wr_data
);
  localparam int  AW   = $clog2(LEN);
  localparam bit  POW2 = (LEN == (1 << AW));

  logic [W-1:0]  mem [LEN];
  logic [AW-1:0] ptr;

  assign rd_addr = ptr;
  assign rd_data = mem[ptr];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ptr <= '0;
    else if (clear)   ptr <= '0;
    else if (shift) begin
      if (POW2)       ptr <= ptr + 1'b1;           // natural wrap-around
      else            ptr <= (ptr == AW'(LEN - 1)) ? '0 : ptr + 1'b1;
    end
  end
endmodule
