// tb_blockram_fifo -- random pushes and pops against a queue model; checks
// data order, full, empty and count, including simultaneous push and pop
// and attempts to push when full or pop when empty.
module tb_blockram_fifo;
  localparam int WIDTH = 50, DEPTH = 16;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, push, pop, full, empty;
  logic [WIDTH-1:0] wdata, rdata;
  logic [4:0] count;

  blockram_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .full, .empty, .count);

  logic [WIDTH-1:0] q[$];
  int checks = 0, failures = 0, nfull = 0, nempty = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; push = 0; pop = 0; wdata = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int c = 0; c < 3000; c++) begin
      int bias;
      bias = (c / 300) % 2 == 0 ? 70 : 30;   // alternate filling and draining
      push  = ($urandom_range(0, 99) < bias);
      pop   = ($urandom_range(0, 99) < 100 - bias);
      wdata = WIDTH'({$urandom, $urandom});
      #1;
      checks++;
      if (full != (q.size() == DEPTH) || empty != (q.size() == 0) || int'(count) != q.size()) begin
        failures++; $display("flags wrong: size %0d full %0b empty %0b count %0d", q.size(), full, empty, count);
      end
      if (full) nfull++;
      if (empty) nempty++;
      if (!empty) begin
        checks++;
        if (rdata !== q[0]) begin failures++; $display("data %0h expected %0h", rdata, q[0]); end
      end
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && q.size() < DEPTH + (pop ? 1 : 0) && !full) q.push_back(wdata);
      @(negedge clk);
    end
    checks++;
    if (nfull == 0 || nempty == 0) begin failures++; $display("full or empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
