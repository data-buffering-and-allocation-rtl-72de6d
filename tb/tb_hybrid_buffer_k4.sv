// tb_hybrid_buffer_k4 -- builds the doubly stored memory (word a = pixels
// 2a..2a+3) from a random image, reads it pass by pass for 60 random active
// points, and checks that after pass N the four windows of group N-1 see
// pixels 4(N-1)+o+j.
module tb_hybrid_buffer_k4;
  import gtm_pkg::*;

  localparam int DEPTH = 64;
  localparam int W     = 60;
  localparam int NPIX  = 4096;

  logic clk = 0;
  always #5 clk = ~clk;

  logic en, c;
  logic [5:0] idx;
  pix_t d [K];
  pix_t w [K];

  hybrid_buffer_k4 #(.DEPTH(DEPTH)) dut (.clk, .en, .idx, .c, .d, .w);

  pix_t img [NPIX];
  int   off [W];
  int   checks = 0, failures = 0, nc [2];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nc[0] = 0; nc[1] = 0;
    for (int i = 0; i < NPIX; i++) img[i] = pix_t'($urandom);
    for (int i = 0; i < W; i++) off[i] = int'($urandom_range(0, 900));
    en = 0; idx = '0; c = 0;
    for (int j = 0; j < K; j++) d[j] = '0;
    @(negedge clk);
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < W; i++) begin
        int a;
        a = (4*n + off[i]) / 2;
        en = 1; idx = 6'(i); c = 1'(off[i] % 2);
        nc[off[i] % 2]++;
        for (int j = 0; j < K; j++) d[j] = img[2*a + j];
        #1;
        if (n > 0)
          for (int j = 0; j < K; j++) begin
            checks++;
            if (w[j] !== img[4*(n-1) + off[i] + j]) begin
              failures++;
              if (failures < 10) $display("n=%0d pt=%0d lane %0d: %0h vs %0h", n, i, j, w[j], img[4*(n-1)+off[i]+j]);
            end
          end
        @(negedge clk);
      end
    end
    checks++;
    if (nc[0] == 0 || nc[1] == 0) begin failures++; $display("both control values must occur"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
