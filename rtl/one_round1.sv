// one_round1 -- Round 1: tests every Round 0 region of interest with the
// templates of its target super-group, four pixels per cycle.
//
// The unit scans the Round 0 summary that the four Round 0 units left in the
// result area of their memories (strip s in memory s, two pixels per word).
// A pixel whose stored score reaches `threshold` is a region of interest
// (ROI); its stored pair index is its target super-group.  The super-group
// table gives the first Round 1 template and how many follow (2 or 5 in the
// source design).  Each template has R1_POINTS = 80 active points stored as
// R1_ROWS = 20 rows of four; row r of a template reads one byte from each of
// the four memories in the same cycle (every memory holds a full copy of the
// image), so a template takes 20 cycles and the next one starts right after.
// Reads return one cycle later and are summed as target minus background.
// The template with the highest score is reported to the host as one result
// (pixel, super-group, template, score).
//
// Timing per ROI: 20 cycles per template plus one cycle to drain the read
// pipeline, one to hand over the result (longer if `res_ready` is low) and
// one to move on; a non-ROI pixel costs two cycles and a summary word three
// more.  `start` begins a full scan when idle; `done` pulses at the end.
// Tables are written while idle.
//
// From the source design: four bytes per cycle, one from each memory, random
// access at ROI positions, 80 points in 20 cycles, the 2-or-5 template sets
// chosen by super-group.  This design's own choices: the scan of a stored
// summary, the threshold test, the score arithmetic and the result format.
module one_round1
  import gtm_pkg::*;
#(
  parameter int unsigned STRIP_PIX = 76800,
  parameter int unsigned RES_BASE  = 76800 + GUARD_WORDS,
  parameter int unsigned TPL_MAX   = R1_TPL_MAX
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // tables
  input  logic                      tpl_we,
  input  logic [$clog2(TPL_MAX*R1_ROWS)-1:0] tpl_addr,
  input  apoint_t                   tpl_row [N_MEM],
  input  logic                      sg_we,
  input  logic [SG_W-1:0]           sg_idx,
  input  logic [4:0]                sg_first,
  input  logic [2:0]                sg_count,
  input  logic signed [SCORE_W-1:0] threshold,
  // control
  input  logic                      start,
  output logic                      busy,
  output logic                      done,
  // memory ports
  output mem_req_t                  mem_req [N_MEM],
  input  word_t                     mem_rdata [N_MEM],
  // results
  output logic                      res_valid,
  output r1_res_t                   res_data,
  input  logic                      res_ready
);

  localparam int unsigned TA_W   = $clog2(TPL_MAX*R1_ROWS);
  localparam int unsigned NWORDS = STRIP_PIX / 2;
  localparam int unsigned WP_W   = $clog2(NWORDS);
  localparam int unsigned ROW_W  = $clog2(R1_ROWS);
  localparam int unsigned ST_W   = $clog2(N_MEM);

  apoint_t         tpl_mem [TPL_MAX*R1_ROWS][N_MEM];
  logic [4:0]      sg_first_mem [2**SG_W];
  logic [2:0]      sg_count_mem [2**SG_W];

  typedef enum logic [2:0] {S_IDLE, S_SCAN_RD, S_SCAN_WAIT, S_CHECK, S_RUN,
                            S_DRAIN, S_PUSH, S_NEXT} state_e;
  state_e state;
  logic   done_q;

  always_ff @(posedge clk) begin
    if (tpl_we && state == S_IDLE)
      for (int m = 0; m < N_MEM; m++) tpl_mem[tpl_addr][m] <= tpl_row[m];
    if (sg_we && state == S_IDLE) begin
      sg_first_mem[sg_idx] <= sg_first;
      sg_count_mem[sg_idx] <= sg_count;
    end
  end

  logic [ST_W-1:0]    strip;
  logic [WP_W-1:0]    wpos;
  logic               half;
  word_t              res_word;
  r0_res_t            entry;
  logic [PADDR_W-1:0] roi_pix;
  logic [SG_W-1:0]    roi_sg;
  logic [4:0]         cur_tpl;
  logic [2:0]         tpl_left;
  logic [ROW_W-1:0]   row;

  logic signed [ACC_W-1:0] acc, best;
  logic [4:0]              best_tpl;

  assign entry = half ? res_word[31:16] : res_word[15:0];

  logic [PADDR_W-1:0] cand_pix;
  assign cand_pix = PADDR_W'(strip) * PADDR_W'(STRIP_PIX) + PADDR_W'({wpos, half});

  logic [TA_W-1:0] tpl_index;
  assign tpl_index = TA_W'(cur_tpl) * TA_W'(R1_ROWS) + TA_W'(row);

  // read pipeline
  logic              dv, d_first, d_last;
  logic [4:0]        d_tpl;
  logic [1:0]        d_sel [N_MEM];
  logic [N_MEM-1:0]  d_tgt;
  logic [PADDR_W-1:0] pt_pix [N_MEM];

  always_comb
    for (int m = 0; m < N_MEM; m++)
      pt_pix[m] = roi_pix + PADDR_W'(tpl_mem[tpl_index][m].off);

  always_comb begin
    for (int m = 0; m < N_MEM; m++) mem_req[m] = '0;
    unique case (state)
      S_SCAN_RD: begin
        mem_req[strip].req  = 1'b1;
        mem_req[strip].addr = waddr_t'(RES_BASE) + waddr_t'(wpos);
      end
      S_RUN:
        for (int m = 0; m < N_MEM; m++) begin
          mem_req[m].req  = 1'b1;
          mem_req[m].addr = pt_pix[m][PADDR_W-1:2];
        end
      default: ;
    endcase
  end

  logic signed [ACC_W-1:0] row_sum, acc_next;
  always_comb begin
    row_sum = '0;
    for (int m = 0; m < N_MEM; m++)
      row_sum += signed_pix(mem_rdata[m][d_sel[m]*PIX_W +: PIX_W], d_tgt[m]);
    acc_next = (d_first ? '0 : acc) + row_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dv <= 1'b0; d_first <= 1'b0; d_last <= 1'b0; d_tpl <= '0; d_tgt <= '0;
      for (int m = 0; m < N_MEM; m++) d_sel[m] <= '0;
      acc <= '0; best <= '0; best_tpl <= '0;
    end else begin
      dv      <= (state == S_RUN);
      d_first <= (row == '0);
      d_last  <= (row == ROW_W'(R1_ROWS-1));
      d_tpl   <= cur_tpl;
      for (int m = 0; m < N_MEM; m++) begin
        d_sel[m] <= pt_pix[m][1:0];
        d_tgt[m] <= tpl_mem[tpl_index][m].tgt;
      end
      if (state == S_CHECK) begin
        best     <= {1'b1, {(ACC_W-1){1'b0}}};
        best_tpl <= '0;
      end else if (dv) begin
        acc <= acc_next;
        if (d_last && acc_next > best) begin
          best     <= acc_next;
          best_tpl <= d_tpl;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; strip <= '0; wpos <= '0; half <= 1'b0; res_word <= '0;
      roi_pix <= '0; roi_sg <= '0; cur_tpl <= '0; tpl_left <= '0; row <= '0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SCAN_RD; strip <= '0; wpos <= '0; half <= 1'b0;
        end
        S_SCAN_RD: state <= S_SCAN_WAIT;
        S_SCAN_WAIT: begin
          res_word <= mem_rdata[strip];
          half     <= 1'b0;
          state    <= S_CHECK;
        end
        S_CHECK: begin
          if (entry.score >= threshold && sg_count_mem[entry.sg] != '0) begin
            roi_pix  <= cand_pix;
            roi_sg   <= entry.sg;
            cur_tpl  <= sg_first_mem[entry.sg];
            tpl_left <= sg_count_mem[entry.sg];
            row      <= '0;
            state    <= S_RUN;
          end else state <= S_NEXT;
        end
        S_RUN: begin
          if (row == ROW_W'(R1_ROWS-1)) begin
            row      <= '0;
            cur_tpl  <= cur_tpl + 1'b1;
            tpl_left <= tpl_left - 1'b1;
            if (tpl_left == 3'd1) state <= S_DRAIN;
          end else row <= row + 1'b1;
        end
        S_DRAIN: state <= S_PUSH;
        S_PUSH:  if (res_ready) state <= S_NEXT;
        S_NEXT: begin
          if (!half) begin
            half  <= 1'b1;
            state <= S_CHECK;
          end else if (wpos == WP_W'(NWORDS-1)) begin
            if (strip == ST_W'(N_MEM-1)) begin
              state  <= S_IDLE;
              done_q <= 1'b1;
            end else begin
              strip <= strip + 1'b1;
              wpos  <= '0;
              state <= S_SCAN_RD;
            end
          end else begin
            wpos  <= wpos + 1'b1;
            state <= S_SCAN_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign done      = done_q;
  assign res_valid = (state == S_PUSH);
  assign res_data  = '{pix: roi_pix, sg: roi_sg, tpl: best_tpl, score: best};

  // a result stays on offer until it is taken
  property p_res_hold;
    @(posedge clk) disable iff (!rst_n) (res_valid && !res_ready) |=> (res_valid && $stable(res_data));
  endproperty
  assert property (p_res_hold);

endmodule
