// Shared body of the end-to-end testbenches of starfire_gtm_top.  The
// including module declares ROWS, COLS, FRAME, STRIP, G, RESB, NTPL, TA_W,
// WDOG, THRESH, REQUEUE, POP_DIV, RB_P, RB_Q, the top's signals, the instance `dut` and the memories g_mem[0..3].

  pix_t    img [FRAME];
  apoint_t r0p [R0_PAIRS][R0_DEPTH];
  int      r0w [R0_PAIRS];
  apoint_t r1t [NTPL][R1_POINTS];
  int      first_of [R0_PAIRS], count_of [R0_PAIRS];
  r0_res_t summ [FRAME];
  r1_res_t expq [$];
  int checks = 0, failures = 0;
  int n_in_full = 0, n_refused = 0, n_keep = 0, n_repl = 0, n_sat = 0;
  int n_roi = 0, n_nonroi = 0, n_sg2 = 0, n_sg5 = 0, n_out_stall = 0;
  int n_align [4];
  int n_k2_c [2], n_hy_c [2], n_rb_win = 0, n_bk_win = 0, rb_taken = 0, rb_last = -1;
  int cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (host_in_full) n_in_full++;
    if (dut.u_one_round1.res_valid && dut.out_full) n_out_stall++;
  end

  initial begin
    repeat (WDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the row-buffer windows belong to the pixel accepted on the previous edge
  always @(posedge clk) if (rst_n) begin
    if (alt_rb_win_valid) begin n_rb_win++; rb_check(0); end
    if (alt_bk_win_valid) begin n_bk_win++; rb_check(1); end
    if (alt_rb_valid) begin rb_last = rb_taken; rb_taken++; end
  end

  function automatic int pixel(input int n);
    return (n < FRAME) ? int'(img[n]) : 0;
  endfunction

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  task automatic rb_check(input bit banked);
    for (int r = 0; r < RB_P; r++)
      for (int q = 0; q < RB_Q; q++) begin
        int a;
        a = rb_last - (RB_P-1-r)*COLS - (RB_Q-1-q);
        chk(a >= 0 && (banked ? alt_bk_win[r][q] : alt_rb_win[r][q]) === img[a],
            $sformatf("%s window of pixel %0d at [%0d][%0d]", banked ? "banked" : "row", rb_last, r, q));
      end
  endtask

  // The alternative buffering schemes, fed from the same frame: the k = 2
  // and hybrid buffers read the active points of pair 0 pass by pass, and
  // both row buffers take the first rows of the frame as a pixel stream.
  task automatic alt_schemes();
    int np, nstream, n;
    np = 8;
    for (int t = 0; t <= np; t++)
      for (int i = 0; i < r0w[0]; i++) begin
        int o, p;
        o = int'(r0p[0][i].off);
        p = 2*t + o;
        alt_k2_en = 1; alt_k2_idx = $bits(alt_k2_idx)'(i); alt_k2_c = 1'(o % 2);
        n_k2_c[o % 2]++;
        alt_k2_d_even = pix_t'(pixel(p - p % 2));
        alt_k2_d_odd  = pix_t'(pixel(p - p % 2 + 1));
        #1;
        if (t > 0) begin
          chk(alt_k2_w_even === pix_t'(pixel(2*(t-1) + o)),     $sformatf("k2 even window t=%0d pt=%0d", t, i));
          chk(alt_k2_w_odd  === pix_t'(pixel(2*(t-1) + o + 1)), $sformatf("k2 odd window t=%0d pt=%0d", t, i));
        end
        @(negedge clk);
      end
    alt_k2_en = 0;
    for (int t = 0; t <= np; t++)
      for (int i = 0; i < r0w[0]; i++) begin
        int o, a;
        o = int'(r0p[0][i].off);
        a = (4*t + o) / 2;                    // doubly stored word: pixels 2a..2a+3
        alt_hy_en = 1; alt_hy_idx = $bits(alt_hy_idx)'(i); alt_hy_c = 1'(o % 2);
        n_hy_c[o % 2]++;
        for (int j = 0; j < K; j++) alt_hy_d[j] = pix_t'(pixel(2*a + j));
        #1;
        if (t > 0)
          for (int j = 0; j < K; j++)
            chk(alt_hy_w[j] === pix_t'(pixel(4*(t-1) + o + j)), $sformatf("hybrid window t=%0d pt=%0d lane %0d", t, i, j));
        @(negedge clk);
      end
    alt_hy_en = 0;
    // row buffers: random input gaps, one window per pixel once filled
    nstream = (FRAME < 8 * COLS) ? FRAME : 8 * COLS;
    n = 0;
    while (n < nstream) begin
      alt_rb_valid = ($urandom_range(0, 3) != 0);
      alt_bk_valid = alt_rb_valid;
      alt_rb_pix = img[n];
      alt_bk_pix = img[n];
      @(negedge clk);
      if (alt_rb_valid) n++;
    end
    alt_rb_valid = 0; alt_bk_valid = 0;
    @(negedge clk);
    chk(n_rb_win == nstream - ((RB_P-1)*COLS + RB_Q-1), $sformatf("row buffer gave %0d windows", n_rb_win));
    chk(n_bk_win == n_rb_win, $sformatf("banked row buffer gave %0d windows", n_bk_win));
  endtask

  task automatic load_frame();
    int i;
    bit tried;
    i = 0;
    tried = 0;
    while (i < FRAME / K) begin
      host_in_push = ($urandom_range(0, 3) != 0) && !host_in_full;
      host_in_word.addr = waddr_t'(i);
      host_in_word.data = {img[4*i+3], img[4*i+2], img[4*i+1], img[4*i]};
      if (i >= 40 && !tried && !dut.in_empty) begin
        // a start while words are still queued must be refused
        cmd_r0_start = 1'b1;
        tried = 1;
      end
      @(negedge clk);
      if (cmd_r0_start) begin
        if (!busy && dut.owner == OWN_HOST) n_refused++;
        cmd_r0_start = 1'b0;
      end
      if (host_in_push) i++;
    end
    host_in_push = 0;
    while (!dut.in_empty) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic round0(input int p);
    int w, c0;
    w = r0w[p];
    r0_tpl_clear = 1; @(negedge clk); r0_tpl_clear = 0;
    for (int i = 0; i < w; i++) begin
      r0_tpl_push = 1; r0_tpl_point = r0p[p][i];
      n_align[int'(r0p[p][i].off) % 4]++;
      @(negedge clk);
    end
    r0_tpl_push = 0;
    // model
    for (int x = 0; x < FRAME; x++) begin
      int s;
      r0_res_t n;
      s = 0;
      for (int i = 0; i < w; i++) begin
        int v;
        v = pixel(x + int'(r0p[p][i].off));
        s += r0p[p][i].tgt ? v : -v;
      end
      n.sg = SG_W'(p);
      n.score = sat_score(ACC_W'(s));
      if (s > 4095 || s < -4096) n_sat++;
      if (p == 0 || n.score > summ[x].score) begin
        if (p != 0) n_repl++;
        summ[x] = n;
      end else n_keep++;
    end
    cmd_r0_pair = SG_W'(p); cmd_r0_start = 1; @(negedge clk); cmd_r0_start = 0;
    c0 = cyc;
    // During the first sweep the host queues the frame's first words again
    // (same data); they wait in the input FIFO until the sweep ends.
    for (int i = 0; p == 0 && i < REQUEUE; i++) begin
      host_in_push = !host_in_full;
      host_in_word.addr = waddr_t'(i);
      host_in_word.data = {img[4*i+3], img[4*i+2], img[4*i+1], img[4*i]};
      @(negedge clk);
    end
    host_in_push = 0;
    while (!r0_done) @(negedge clk);
    chk(cyc - c0 + 1 == (G+1)*w + 4*G + 1,
        $sformatf("pair %0d sweep took %0d cycles, expected %0d", p, cyc - c0 + 1, (G+1)*w + 4*G + 1));
    @(negedge clk);
    while (!dut.in_empty) @(negedge clk);
  endtask

  task automatic check_summary();
    for (int x = 0; x < FRAME; x++) begin
      word_t wd;
      r0_res_t got;
      int s;
      s = x / STRIP;
      case (s)
        0: wd = g_mem[0].u_mem.mem[RESB + (x % STRIP) / 2];
        1: wd = g_mem[1].u_mem.mem[RESB + (x % STRIP) / 2];
        2: wd = g_mem[2].u_mem.mem[RESB + (x % STRIP) / 2];
        default: wd = g_mem[3].u_mem.mem[RESB + (x % STRIP) / 2];
      endcase
      got = (x % 2 == 1) ? wd[31:16] : wd[15:0];
      chk(got == summ[x], $sformatf("summary of pixel %0d: got sg %0d score %0d, expected sg %0d score %0d",
                                    x, got.sg, got.score, summ[x].sg, summ[x].score));
    end
  endtask

  task automatic round1();
    int got_n;
    for (int t = 0; t < NTPL; t++)
      for (int r = 0; r < R1_ROWS; r++) begin
        r1_tpl_we = 1; r1_tpl_addr = TA_W'(t * R1_ROWS + r);
        for (int m = 0; m < N_MEM; m++) r1_tpl_row[m] = r1t[t][4*r + m];
        @(negedge clk);
      end
    r1_tpl_we = 0;
    for (int g = 0; g < R0_PAIRS; g++) begin
      r1_sg_we = 1; r1_sg_idx = SG_W'(g); r1_sg_first = 5'(first_of[g]); r1_sg_count = 3'(count_of[g]);
      @(negedge clk);
    end
    r1_sg_we = 0;
    // model
    for (int x = 0; x < FRAME; x++) begin
      if (summ[x].score >= r1_threshold) begin
        r1_res_t r;
        int sg;
        n_roi++;
        sg = int'(summ[x].sg);
        if (count_of[sg] == 2) n_sg2++; else n_sg5++;
        r.pix = PADDR_W'(x); r.sg = SG_W'(sg);
        r.score = {1'b1, {(ACC_W-1){1'b0}}}; r.tpl = '0;
        for (int t = first_of[sg]; t < first_of[sg] + count_of[sg]; t++) begin
          int s;
          s = 0;
          for (int i = 0; i < R1_POINTS; i++) begin
            int v;
            v = pixel(x + int'(r1t[t][i].off));
            s += r1t[t][i].tgt ? v : -v;
          end
          if (ACC_W'(s) > r.score) begin r.score = ACC_W'(s); r.tpl = 5'(t); end
        end
        expq.push_back(r);
      end else n_nonroi++;
    end
    cmd_r1_start = 1; @(negedge clk); cmd_r1_start = 0;
    got_n = 0;
    while (busy || !host_out_empty) begin
      host_out_pop = !host_out_empty && ($urandom_range(0, POP_DIV-1) == 0);
      if (host_out_pop) begin
        r1_res_t e;
        got_n++;
        if (expq.size() == 0) chk(1'b0, "unexpected Round 1 result");
        else begin
          e = expq.pop_front();
          chk(host_out_data == e,
              $sformatf("Round 1 result: got pix %0d sg %0d tpl %0d score %0d, expected pix %0d sg %0d tpl %0d score %0d",
                        host_out_data.pix, host_out_data.sg, host_out_data.tpl, host_out_data.score,
                        e.pix, e.sg, e.tpl, e.score));
        end
      end
      @(negedge clk);
    end
    host_out_pop = 0;
    chk(expq.size() == 0, $sformatf("%0d Round 1 results missing", expq.size()));
    $display("Round 1 reported %0d regions of interest", got_n);
  endtask

  initial begin
    rst_n = 0; host_in_push = 0; host_in_word = '0; r0_tpl_clear = 0; r0_tpl_push = 0;
    r0_tpl_point = '0; r1_tpl_we = 0; r1_tpl_addr = '0; r1_sg_we = 0; r1_sg_idx = '0;
    r1_sg_first = '0; r1_sg_count = '0; r1_threshold = SCORE_W'(THRESH); cmd_r0_start = 0;
    cmd_r0_pair = '0; cmd_r1_start = 0; host_out_pop = 0;
    for (int m = 0; m < N_MEM; m++) r1_tpl_row[m] = '0;
    for (int a = 0; a < 4; a++) n_align[a] = 0;
    n_k2_c[0] = 0; n_k2_c[1] = 0; n_hy_c[0] = 0; n_hy_c[1] = 0;
    alt_k2_en = 0; alt_k2_idx = '0; alt_k2_c = 0; alt_k2_d_even = '0; alt_k2_d_odd = '0;
    alt_hy_en = 0; alt_hy_idx = '0; alt_hy_c = 0;
    for (int j = 0; j < K; j++) alt_hy_d[j] = '0;
    alt_rb_valid = 0; alt_rb_pix = '0; alt_bk_valid = 0; alt_bk_pix = '0;
    // image: dim random pixels with one bright patch
    for (int i = 0; i < FRAME; i++) img[i] = pix_t'($urandom_range(0, 127));
    for (int i = FRAME / 3; i < FRAME / 3 + 2 * COLS; i++) if (i % COLS < 24) img[i] = 8'hFF;
    // Round 0 pairs: five random pairs of 60 points and one short all-target pair
    for (int p = 0; p < R0_PAIRS; p++) begin
      r0w[p] = (p == R0_PAIRS-1) ? 17 : R0_POINTS;
      for (int i = 0; i < r0w[p]; i++) begin
        r0p[p][i].tgt = (p == R0_PAIRS-1) ? 1'b1 : 1'($urandom);
        r0p[p][i].off = OFF_W'((i < 4) ? i : (p == R0_PAIRS-1) ? $urandom_range(0, 20) : $urandom_range(0, 3 * COLS));
      end
    end
    for (int g = 0, f = 0; g < R0_PAIRS; g++) begin
      count_of[g] = (g % 2 == 1) ? 2 : 5;
      first_of[g] = f;
      f += count_of[g];
    end
    for (int t = 0; t < NTPL; t++)
      for (int i = 0; i < R1_POINTS; i++) begin
        r1t[t][i].tgt = 1'($urandom);
        r1t[t][i].off = OFF_W'($urandom_range(0, 3 * COLS));
      end
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);

    load_frame();
    $display("cycle %0d: frame loaded", cyc);
    for (int p = 0; p < R0_PAIRS; p++) begin
      round0(p);
      $display("cycle %0d: Round 0 pair %0d done", cyc, p);
    end
    check_summary();
    round1();
    $display("cycle %0d: Round 1 done", cyc);
    alt_schemes();
    $display("cycle %0d: alternative buffering schemes done", cyc);

    chk(n_in_full > 0,   "input FIFO never full");
    chk(n_refused > 0,   "no start refused during a load");
    for (int a = 0; a < 4; a++) chk(n_align[a] > 0, $sformatf("alignment %0d unused", a));
    chk(n_keep > 0,      "summary never kept an older pair");
    chk(n_repl > 0,      "summary never replaced an older pair");
    chk(n_sat > 0,       "no score saturated");
    chk(n_roi > 0,       "no region of interest");
    chk(n_nonroi > 0,    "every pixel was a region of interest");
    chk(n_sg2 > 0,       "no 2-template super-group");
    chk(n_sg5 > 0,       "no 5-template super-group");
    chk(n_out_stall > 0, "output FIFO never pushed back");
    for (int c = 0; c < 2; c++) begin
      chk(n_k2_c[c] > 0, $sformatf("k = 2 buffer never saw control %0d", c));
      chk(n_hy_c[c] > 0, $sformatf("hybrid buffer never saw control %0d", c));
    end
    chk(n_rb_win > 0,    "row buffer gave no window");
    chk(n_bk_win > 0,    "banked row buffer gave no window");
    $display("mechanisms: in_full=%0d refused=%0d align=%0d/%0d/%0d/%0d keep=%0d replace=%0d sat=%0d roi=%0d nonroi=%0d sg2=%0d sg5=%0d out_stall=%0d k2=%0d/%0d hybrid=%0d/%0d rb=%0d banked=%0d",
             n_in_full, n_refused, n_align[0], n_align[1], n_align[2], n_align[3], n_keep, n_repl,
             n_sat, n_roi, n_nonroi, n_sg2, n_sg5, n_out_stall,
             n_k2_c[0], n_k2_c[1], n_hy_c[0], n_hy_c[1], n_rb_win, n_bk_win);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
