// tb_internal_buffer_k2 -- checks the even/odd buffer against a flat pixel
// model: random image, 60 active points with odd and even offsets, 30
// passes; after pass t the even and odd windows of group t-1 must see pixels
// 2(t-1)+o and 2(t-1)+o+1.  The first points reproduce the figure's example
// offsets 0, 71, 101, 132.
module tb_internal_buffer_k2;
  import gtm_pkg::*;

  localparam int DEPTH = 64;
  localparam int W     = 60;
  localparam int NPIX  = 4096;

  logic clk = 0;
  always #5 clk = ~clk;

  logic en, c;
  logic [5:0] idx;
  pix_t d_even, d_odd, w_even, w_odd;

  internal_buffer_k2 #(.DEPTH(DEPTH)) dut (.clk, .en, .idx, .c, .d_even, .d_odd, .w_even, .w_odd);

  pix_t img [NPIX];
  int   off [W];
  int   checks = 0, failures = 0, nodd = 0, neven = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NPIX; i++) img[i] = pix_t'($urandom);
    off[0] = 0; off[1] = 71; off[2] = 101; off[3] = 132;
    for (int i = 4; i < W; i++) off[i] = int'($urandom_range(0, 900));
    en = 0; idx = '0; c = 0; d_even = '0; d_odd = '0;
    @(negedge clk);
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < W; i++) begin
        int p;
        p = 2*t + off[i];
        en = 1; idx = 6'(i); c = 1'(off[i] % 2);
        if (c) nodd++; else neven++;
        d_even = img[p - p % 2];
        d_odd  = img[p - p % 2 + 1];
        #1;
        if (t > 0) begin
          checks += 2;
          if (w_even !== img[2*(t-1) + off[i]]) begin
            failures++; $display("even window t=%0d pt=%0d: %0h vs %0h", t, i, w_even, img[2*(t-1)+off[i]]);
          end
          if (w_odd !== img[2*(t-1) + off[i] + 1]) begin
            failures++; $display("odd window t=%0d pt=%0d: %0h vs %0h", t, i, w_odd, img[2*(t-1)+off[i]+1]);
          end
        end
        @(negedge clk);
      end
    end
    checks++;
    if (nodd == 0 || neven == 0) begin failures++; $display("both control values must occur"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
