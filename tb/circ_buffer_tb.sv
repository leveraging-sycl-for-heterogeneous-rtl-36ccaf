// circ_buffer_tb: the circular buffer must behave as a shift register of LEN
// words: with every shifted-in word written to the slot just read, a read
// returns the word shifted in LEN shifts earlier. Checked for a power-of-two
// length (counter wraps by itself) and another length (compare and reset),
// with the write arriving three cycles after the read, as in the pipeline.
module circ_buffer_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int L1 = 16, L2 = 12;
  logic        sh1, sh2;
  logic [15:0] rd1, rd2;
  logic [3:0]  ra1, ra2;
  logic        we1, we2;
  logic [3:0]  wa1, wa2;
  logic [15:0] wd1, wd2;

  circ_buffer #(.W(16), .LEN(L1)) d1 (.clk, .rst_n, .clear(1'b0), .shift(sh1), .rd_data(rd1),
    .rd_addr(ra1), .wr_en(we1), .wr_addr(wa1), .wr_data(wd1));
  circ_buffer #(.W(16), .LEN(L2)) d2 (.clk, .rst_n, .clear(1'b0), .shift(sh2), .rd_data(rd2),
    .rd_addr(ra2), .wr_en(we2), .wr_addr(wa2), .wr_data(wd2));

  // three-stage delay of (valid, address, value) for the writes
  logic        v1 [3], v2 [3];
  logic [3:0]  a1 [3], a2 [3];
  logic [15:0] x1 [3], x2 [3];
  int n1, n2;

  assign we1 = v1[2]; assign wa1 = a1[2]; assign wd1 = x1[2];
  assign we2 = v2[2]; assign wa2 = a2[2]; assign wd2 = x2[2];

  always @(posedge clk) begin
    if (!rst_n) begin
      n1 <= 0; n2 <= 0;
      for (int i = 0; i < 3; i++) begin v1[i] <= 0; v2[i] <= 0; end
    end else begin
      if (sh1) begin
        checks++;
        if (n1 >= L1 && rd1 != 16'(n1 - L1)) begin failures++; $display("L1: shift %0d read %0d", n1, rd1); end
        n1 <= n1 + 1;
      end
      if (sh2) begin
        checks++;
        if (n2 >= L2 && rd2 != 16'(n2 - L2)) begin failures++; $display("L2: shift %0d read %0d", n2, rd2); end
        n2 <= n2 + 1;
      end
      v1[0] <= sh1; a1[0] <= ra1; x1[0] <= 16'(n1);
      v2[0] <= sh2; a2[0] <= ra2; x2[0] <= 16'(n2);
      for (int i = 1; i < 3; i++) begin
        v1[i] <= v1[i-1]; a1[i] <= a1[i-1]; x1[i] <= x1[i-1];
        v2[i] <= v2[i-1]; a2[i] <= a2[i-1]; x2[i] <= x2[i-1];
      end
    end
  end

  initial begin
    sh1 = 0; sh2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      sh1 = ($urandom % 4) != 0;
      sh2 = ($urandom % 3) != 0;
    end
    @(negedge clk); sh1 = 0; sh2 = 0;
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
