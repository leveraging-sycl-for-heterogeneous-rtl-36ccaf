// sync_fifo_tb: random pushes and pops on a 5-deep queue (not a power of two)
// compared with a queue model: data order, fill level, full/empty flags and
// the push-while-full-and-popped case.
module sync_fifo_tb;
  localparam int W = 8, DEPTH = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  logic [W-1:0] model[$];
  int checks = 0, failures = 0, full_pushpop = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid  = ($urandom % 100) < (n < 1500 ? 70 : 35);
      out_ready = ($urandom % 100) < (n < 1500 ? 35 : 70);
      in_data   = W'($urandom);
      #1;
      check(count == model.size(), "count");
      check(out_valid == (model.size() != 0), "out_valid");
      check(in_ready == (model.size() < DEPTH || out_ready), "in_ready");
      if (out_valid) check(out_data == model[0], "head data");
      begin
        bit do_pop, do_push;
        do_pop  = out_valid && out_ready;
        do_push = in_valid && in_ready;
        @(posedge clk);
        if (do_push && model.size() == DEPTH) full_pushpop++;
        if (do_pop) void'(model.pop_front());
        if (do_push) model.push_back(in_data);
      end
    end
    check(full_pushpop > 0, "push and pop while full never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
