// sync_fifo: the inter-module queue of the accelerator.
//
// Every module of a basic kernel talks to its neighbours only through these
// queues, and the whole kernel is data-driven: a producer stalls while the
// queue is full (in_ready low) and a consumer stalls while it is empty
// (out_valid low). Depths follow the kernel's queue definitions (set by the
// instantiating module).
//
// Interface: valid/ready on both sides, a transfer happens in a cycle where
// both are high. out_data is the head of the queue (first-word fall-through),
// so a pop and the use of the data happen in the same cycle. A push and a pop
// can happen in the same cycle, also when the queue is full.
// Timing: an element pushed in cycle t is visible at the output in cycle t+1.
// Storage is a plain array indexed by read and write pointers (maps to block
// RAM or registers); count gives the current fill level.
// The overflow assertion is disabled during reset, so lint sees rst_n used
// both as an asynchronous reset and as a sampled signal; this is expected.
module sync_fifo #(
  parameter int W     = 16,
  parameter int DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [W-1:0]               in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W-1:0]               out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          push, pop;

  assign out_valid = (count != 0);
  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]) || out_ready;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // The fill level can never exceed the depth.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= DEPTH[$clog2(DEPTH+1)-1:0])
    else $error("sync_fifo: fill level above depth");
endmodule
