// tb_round0_basic_block -- feeds random template pairs (60 points, random
// target/background tags) and pixels, one per cycle, and checks each score
// against a software sum, that the score appears one cycle after the last
// point and that windows follow each other every 60 cycles.
module tb_round0_basic_block;
  import gtm_pkg::*;

  localparam int W = R0_POINTS;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic en, first, last, tgt;
  pix_t pix;
  logic signed [ACC_W-1:0] score;
  logic score_valid;

  round0_basic_block dut (.clk, .rst_n, .en, .first, .last, .pix, .tgt, .score, .score_valid);

  int checks = 0, failures = 0;
  int expq[$];
  int cyc = 0, last_valid_cyc = -1;

  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) if (rst_n && score_valid) begin
    int e;
    checks++;
    e = expq.pop_front();
    if (int'(score) != e) begin
      failures++;
      $display("score %0d expected %0d", score, e);
    end
    if (last_valid_cyc >= 0) begin
      checks++;
      if (cyc - last_valid_cyc != W) begin
        failures++;
        $display("window spacing %0d, expected %0d", cyc - last_valid_cyc, W);
      end
    end
    last_valid_cyc = cyc;
  end

  initial begin
    rst_n = 0; en = 0; first = 0; last = 0; tgt = 0; pix = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int win = 0; win < 40; win++) begin
      int sum;
      sum = 0;
      for (int i = 0; i < W; i++) begin
        en = 1; first = (i == 0); last = (i == W-1);
        pix = (win == 0) ? 8'hFF : pix_t'($urandom);
        tgt = (win == 0) ? 1'b1 : 1'($urandom);
        sum += tgt ? int'(pix) : -int'(pix);
        if (i == W-1) expq.push_back(sum);
        @(negedge clk);
      end
    end
    en = 0; first = 0; last = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d windows missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
