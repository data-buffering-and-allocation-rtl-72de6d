// tb_one_round1 -- four memories hold the same random image and, per strip,
// a random Round 0 summary.  The unit must report exactly the pixels whose
// score reaches the threshold, each with the best of its super-group's 2 or 5
// templates (80 points, four per cycle from the four memories), in scan
// order.  The first run checks the exact cycle count (20 cycles per template,
// 2 per ROI, 2 per pixel, 2 per summary word); the second run repeats with
// random back-pressure on the result handshake.
module tb_one_round1;
  import gtm_pkg::*;

  localparam int STRIP = 64;
  localparam int RESB  = 2048;
  localparam int NTPL  = 21;
  localparam int TA_W  = $clog2(R1_TPL_MAX*R1_ROWS);

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, tpl_we, sg_we, start, busy, done, res_valid, res_ready;
  logic [TA_W-1:0] tpl_addr;
  apoint_t tpl_row [N_MEM];
  logic [SG_W-1:0] sg_idx;
  logic [4:0] sg_first;
  logic [2:0] sg_count;
  logic signed [SCORE_W-1:0] threshold;
  mem_req_t mem_req [N_MEM];
  word_t mem_rdata [N_MEM];
  r1_res_t res_data;

  one_round1 #(.STRIP_PIX(STRIP), .RES_BASE(RESB)) dut (
    .clk, .rst_n, .tpl_we, .tpl_addr, .tpl_row, .sg_we, .sg_idx, .sg_first, .sg_count,
    .threshold, .start, .busy, .done, .mem_req, .mem_rdata, .res_valid, .res_data, .res_ready);

  for (genvar m = 0; m < N_MEM; m++) begin : g_mem
    sram_model u_mem (.clk, .req(mem_req[m]), .rdata(mem_rdata[m]));
  end

  pix_t    img [4096];
  apoint_t tpl [NTPL][R1_POINTS];
  int      first_of [6], count_of [6];
  r0_res_t summ [4*STRIP];
  r1_res_t expq [$];
  int checks = 0, failures = 0, nstall = 0, exp_cycles;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && res_valid) begin
    if (!res_ready) nstall++;
    else begin
      r1_res_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        e = expq.pop_front();
        if (res_data != e) begin
          failures++;
          $display("got pix %0d sg %0d tpl %0d score %0d; expected pix %0d sg %0d tpl %0d score %0d",
                   res_data.pix, res_data.sg, res_data.tpl, res_data.score, e.pix, e.sg, e.tpl, e.score);
        end
      end
    end
  end

  task automatic build_expected();
    exp_cycles = 0;
    for (int x = 0; x < 4*STRIP; x++) begin
      if (x % 2 == 0) exp_cycles += 2;
      exp_cycles += 2;
      if (summ[x].score >= threshold) begin
        r1_res_t r;
        int sg;
        sg = int'(summ[x].sg);
        r.pix = PADDR_W'(x); r.sg = SG_W'(sg);
        r.score = {1'b1, {(ACC_W-1){1'b0}}}; r.tpl = '0;
        for (int t = first_of[sg]; t < first_of[sg] + count_of[sg]; t++) begin
          int s;
          s = 0;
          for (int i = 0; i < R1_POINTS; i++) begin
            pix_t v;
            v = img[x + int'(tpl[t][i].off)];
            s += tpl[t][i].tgt ? int'(v) : -int'(v);
          end
          if (ACC_W'(s) > r.score) begin r.score = ACC_W'(s); r.tpl = 5'(t); end
        end
        expq.push_back(r);
        exp_cycles += 20 * count_of[sg] + 2;
      end
    end
  endtask

  task automatic run(input logic backpressure);
    int cyc;
    build_expected();
    start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (busy) begin
      res_ready = backpressure ? 1'($urandom_range(0, 2) != 0) : 1'b1;
      @(negedge clk); cyc++;
    end
    res_ready = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
    if (!backpressure) begin
      checks++;
      if (cyc - 1 != exp_cycles) begin failures++; $display("scan took %0d cycles, expected %0d", cyc - 1, exp_cycles); end
    end
  endtask

  initial begin
    rst_n = 0; tpl_we = 0; sg_we = 0; start = 0; res_ready = 1; tpl_addr = '0;
    sg_idx = '0; sg_first = '0; sg_count = '0; threshold = 13'sd500;
    for (int m = 0; m < N_MEM; m++) tpl_row[m] = '0;
    for (int i = 0; i < 4096; i++) img[i] = pix_t'($urandom);
    for (int t = 0; t < NTPL; t++)
      for (int i = 0; i < R1_POINTS; i++) begin
        tpl[t][i].tgt = 1'($urandom);
        tpl[t][i].off = OFF_W'($urandom_range(0, 1500));
      end
    for (int g = 0, f = 0; g < 6; g++) begin
      count_of[g] = (g % 2 == 1) ? 5 : 2;
      first_of[g] = f;
      f += count_of[g];
    end
    for (int x = 0; x < 4*STRIP; x++) begin
      summ[x].sg = SG_W'($urandom_range(0, 5));
      summ[x].score = SCORE_W'($urandom_range(0, 1000));
    end
    @(posedge clk);
    for (int m = 0; m < N_MEM; m++) begin
      for (int i = 0; i < 1024; i++) g_mem[0].u_mem.mem[i] = '0;
    end
    for (int i = 0; i < 1024; i++) begin
      g_mem[0].u_mem.mem[i] = {img[4*i+3], img[4*i+2], img[4*i+1], img[4*i]};
      g_mem[1].u_mem.mem[i] = {img[4*i+3], img[4*i+2], img[4*i+1], img[4*i]};
      g_mem[2].u_mem.mem[i] = {img[4*i+3], img[4*i+2], img[4*i+1], img[4*i]};
      g_mem[3].u_mem.mem[i] = {img[4*i+3], img[4*i+2], img[4*i+1], img[4*i]};
    end
    for (int x = 0; x < STRIP; x += 2) begin
      g_mem[0].u_mem.mem[RESB + x/2] = {summ[0*STRIP+x+1], summ[0*STRIP+x]};
      g_mem[1].u_mem.mem[RESB + x/2] = {summ[1*STRIP+x+1], summ[1*STRIP+x]};
      g_mem[2].u_mem.mem[RESB + x/2] = {summ[2*STRIP+x+1], summ[2*STRIP+x]};
      g_mem[3].u_mem.mem[RESB + x/2] = {summ[3*STRIP+x+1], summ[3*STRIP+x]};
    end
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < NTPL; t++)
      for (int r = 0; r < R1_ROWS; r++) begin
        tpl_we = 1; tpl_addr = TA_W'(t * R1_ROWS + r);
        for (int m = 0; m < N_MEM; m++) tpl_row[m] = tpl[t][4*r + m];
        @(negedge clk);
      end
    tpl_we = 0;
    for (int g = 0; g < 6; g++) begin
      sg_we = 1; sg_idx = SG_W'(g); sg_first = 5'(first_of[g]); sg_count = 3'(count_of[g]);
      @(negedge clk);
    end
    sg_we = 0;
    run(1'b0);
    run(1'b1);
    checks++;
    if (nstall == 0) begin failures++; $display("back-pressure never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
