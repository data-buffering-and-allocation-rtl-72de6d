// tb_four_round0 -- sweeps a 256-pixel strip with three template pairs of
// different sizes (60, 13 and 64 points, offsets with every alignment) and
// checks the per-pixel summary in memory after each sweep against a software
// model: score = sum of target pixels minus background pixels, saturated to
// 13 bits, best pair kept.  Also checks the sweep length,
// (G+1)*W + 4*G + 1 busy cycles for G = 64 groups, and that the summary both
// kept an older pair and replaced it by a newer one.
module tb_four_round0;
  import gtm_pkg::*;

  localparam int STRIP = 256;
  localparam int G     = STRIP / 4;
  localparam int RESB  = 4096;
  localparam int BASE  = 512;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, tpl_clear, tpl_push, start, busy, done;
  apoint_t tpl_point;
  logic [SG_W-1:0] pair;
  mem_req_t mem_req;
  word_t mem_rdata;

  four_round0 #(.STRIP_PIX(STRIP), .RES_BASE(RESB)) dut (
    .clk, .rst_n, .tpl_clear, .tpl_push, .tpl_point, .start, .pair,
    .strip_base(PADDR_W'(BASE)), .busy, .done, .mem_req, .mem_rdata);

  sram_model u_mem (.clk, .req(mem_req), .rdata(mem_rdata));

  pix_t img [8192];
  r0_res_t ref_res [STRIP];
  int checks = 0, failures = 0, n_keep = 0, n_repl = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep(input int p, input int w, input int maxoff);
    apoint_t pts [64];
    int busy_cyc;
    for (int i = 0; i < w; i++) begin
      pts[i].tgt = 1'($urandom);
      pts[i].off = OFF_W'((i < 4) ? i + 4 * (i % 2) : $urandom_range(0, maxoff));
    end
    tpl_clear = 1; @(negedge clk); tpl_clear = 0;
    for (int i = 0; i < w; i++) begin
      tpl_push = 1; tpl_point = pts[i]; @(negedge clk);
    end
    tpl_push = 0;
    // software model
    for (int x = 0; x < STRIP; x++) begin
      int s;
      r0_res_t n;
      s = 0;
      for (int i = 0; i < w; i++) begin
        pix_t v;
        v = img[BASE + x + int'(pts[i].off)];
        s += pts[i].tgt ? int'(v) : -int'(v);
      end
      n.sg = SG_W'(p);
      n.score = sat_score(ACC_W'(s));
      if (p == 0 || n.score > ref_res[x].score) begin
        if (p != 0) n_repl++;
        ref_res[x] = n;
      end else n_keep++;
    end
    pair = SG_W'(p); start = 1; @(negedge clk); start = 0;
    busy_cyc = 1;
    while (!done) begin @(negedge clk); busy_cyc++; end
    @(negedge clk);
    checks++;
    if (busy_cyc != (G+1)*w + 4*G + 1) begin
      failures++; $display("pair %0d: sweep took %0d cycles, expected %0d", p, busy_cyc, (G+1)*w + 4*G + 1);
    end
    for (int x = 0; x < STRIP; x++) begin
      r0_res_t got;
      word_t wd;
      wd = u_mem.mem[RESB + x/2];
      got = (x % 2 == 1) ? wd[31:16] : wd[15:0];
      checks++;
      if (got != ref_res[x]) begin
        failures++;
        if (failures < 10) $display("pair %0d pixel %0d: got sg %0d score %0d, expected sg %0d score %0d",
                                    p, x, got.sg, got.score, ref_res[x].sg, ref_res[x].score);
      end
    end
  endtask

  initial begin
    rst_n = 0; tpl_clear = 0; tpl_push = 0; tpl_point = '0; start = 0; pair = '0;
    for (int i = 0; i < 8192; i++) img[i] = pix_t'($urandom);
    // a bright patch so that saturation occurs
    for (int i = 600; i < 700; i++) img[i] = 8'hFF;
    @(posedge clk);
    for (int i = 0; i < 2048; i++) u_mem.mem[i] = {img[4*i+3], img[4*i+2], img[4*i+1], img[4*i]};
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    sweep(0, 60, 1500);
    sweep(1, 13, 300);
    sweep(2, 64, 1500);
    checks += 2;
    if (n_keep == 0) begin failures++; $display("summary never kept an older pair"); end
    if (n_repl == 0) begin failures++; $display("summary never replaced an older pair"); end
    $display("kept %0d replaced %0d", n_keep, n_repl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
