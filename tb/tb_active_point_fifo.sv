// tb_active_point_fifo -- loads a list of points, replays it several times
// (checking entry, index, first and last flags and the wrap), checks that a
// push into a full list is ignored, that rewind restarts and clear empties.
module tb_active_point_fifo;
  import gtm_pkg::*;

  localparam int DEPTH = 64;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, clear, push, rewind, pop;
  apoint_t wr_point, rd_point;
  logic [5:0] rd_idx;
  logic rd_first, rd_last;
  logic [6:0] count;

  active_point_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .clear, .push, .wr_point, .rewind, .pop,
                                          .rd_point, .rd_idx, .rd_first, .rd_last, .count);

  apoint_t ref_q [DEPTH];
  int checks = 0, failures = 0;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int n);
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < n; i++) begin
      ref_q[i] = apoint_t'($urandom);
      push = 1; wr_point = ref_q[i];
      @(negedge clk);
    end
    push = 0;
  endtask

  task automatic replay(input int n, input int rounds);
    for (int r = 0; r < rounds; r++)
      for (int i = 0; i < n; i++) begin
        chk(rd_point == ref_q[i], $sformatf("entry %0d", i));
        chk(int'(rd_idx) == i, "index");
        chk(rd_first == (i == 0), "first flag");
        chk(rd_last == (i == n-1), "last flag");
        pop = 1; @(negedge clk); pop = 0;
      end
  endtask

  initial begin
    rst_n = 0; clear = 0; push = 0; rewind = 0; pop = 0; wr_point = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    load(60);
    chk(count == 60, "count after load");
    replay(60, 3);
    pop = 1; repeat (7) @(negedge clk); pop = 0;
    rewind = 1; @(negedge clk); rewind = 0;
    replay(60, 1);
    load(DEPTH);
    push = 1; wr_point = apoint_t'($urandom); @(negedge clk); push = 0;
    chk(count == 7'(DEPTH), "full list ignores push");
    replay(DEPTH, 2);
    clear = 1; @(negedge clk); clear = 0;
    chk(count == 0, "clear");
    load(5);
    replay(5, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
