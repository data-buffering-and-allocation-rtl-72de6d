// tb_internal_buffer_k4 -- checks the k = 4 lane alignment against a flat
// pixel model.  A random image is read pass by pass, one word per active
// point with random offsets (all four alignments occur); after pass t the
// buffer must hand window 4(t-1)+j of every point the pixel 4(t-1)+o+j.
module tb_internal_buffer_k4;
  import gtm_pkg::*;

  localparam int DEPTH = 64;
  localparam int W     = 60;
  localparam int NPIX  = 4096;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                     en;
  logic [$clog2(DEPTH)-1:0] idx;
  logic [1:0]               s;
  pix_t                     d [K];
  pix_t                     w [K];

  internal_buffer_k4 #(.DEPTH(DEPTH)) dut (.clk, .en, .idx, .s, .d, .w);

  pix_t img [NPIX];
  int   off [W];
  int   checks = 0, failures = 0;
  int   salign [4];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NPIX; i++) img[i] = pix_t'($urandom);
    for (int i = 0; i < W; i++) off[i] = (i == 0) ? 0 : int'($urandom_range(0, 700));
    en = 0; idx = '0; s = '0;
    for (int j = 0; j < K; j++) d[j] = '0;
    @(negedge clk);
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < W; i++) begin
        int base;
        base = 4*t + off[i];
        en  = 1;
        idx = 6'(i);
        s   = 2'(off[i] % 4);
        salign[off[i] % 4]++;
        for (int j = 0; j < K; j++) d[j] = img[(base - base % 4) + j];
        #1;
        if (t > 0) begin
          for (int j = 0; j < K; j++) begin
            checks++;
            if (w[j] !== img[4*(t-1) + off[i] + j]) begin
              failures++;
              if (failures < 10)
                $display("mismatch t=%0d pt=%0d lane=%0d got %0h exp %0h", t, i, j, w[j], img[4*(t-1)+off[i]+j]);
            end
          end
        end
        @(negedge clk);
      end
    end
    for (int a = 0; a < 4; a++) begin
      checks++;
      if (salign[a] == 0) begin failures++; $display("alignment %0d never exercised", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
