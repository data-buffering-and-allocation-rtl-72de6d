// tb_banked_row_buffer -- streams a random 12 x 16 image through the banked
// 3 x 4 row buffer (six RAMs, two reads each per window), with random gaps in the input, and checks every window against the
// image: win[r][q] = pixel n - (2-r)*16 - (3-q) for the newest pixel n.  It
// also checks that the first valid window comes after (P-1)*COLS + Q-1
// pixels, one per input pixel from then on, and that each pixel is taken from
// outside exactly once (the stream is never re-read).
module tb_banked_row_buffer;
  import gtm_pkg::*;

  localparam int P = 3, Q = 4, COLS = 16, ROWS = 12;
  localparam int N = ROWS * COLS;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, win_valid;
  pix_t in_pix;
  pix_t win [P][Q];

  banked_row_buffer #(.P(P), .Q(Q), .COLS(COLS)) dut (.clk, .rst_n, .in_valid, .in_pix, .win, .win_valid);

  pix_t img [N];
  int checks = 0, failures = 0, nwin = 0, last_n = -1, taken = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the window belongs to the pixel accepted on the previous edge
  always @(posedge clk) if (rst_n) begin
    if (win_valid) check_window();
    if (in_valid) begin last_n = taken; taken++; end
  end

  task automatic check_window();
    nwin++;
    for (int r = 0; r < P; r++)
      for (int q = 0; q < Q; q++) begin
        int a;
        a = last_n - (P-1-r)*COLS - (Q-1-q);
        checks++;
        if (a < 0 || win[r][q] !== img[a]) begin
          failures++;
          if (failures < 10) $display("pixel %0d: win[%0d][%0d]=%0h expected %0h", last_n, r, q, win[r][q], img[a]);
        end
      end
  endtask

  initial begin
    rst_n = 0; in_valid = 0; in_pix = '0;
    for (int i = 0; i < N; i++) img[i] = pix_t'($urandom);
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int n = 0; n < N; ) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_pix = img[n];
      @(negedge clk);
      if (in_valid) n++;
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (nwin != N - ((P-1)*COLS + Q-1)) begin
      failures++; $display("%0d windows, expected %0d", nwin, N - ((P-1)*COLS + Q-1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
