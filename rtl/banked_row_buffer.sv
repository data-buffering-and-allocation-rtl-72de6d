// banked_row_buffer -- full row buffering without mask shift registers: the
// buffered rows sit in NB block RAMs arranged so that all P x Q pixels under
// the mask can be read in one cycle, two per dual-ported RAM.
//
// Placement: a pixel in buffered row rr (its image row modulo P) and column j
// has the linear index k = j + Q*rr and goes to RAM k mod NB, word
// rr*APR + k div NB.  Consecutive pixels of a row are thus spread with stride
// one over the RAMs, and the same column in consecutive rows with stride Q.
// With NB = P*Q/2, the P*Q pixels of any window that does not wrap around a
// row end fall on the RAMs exactly twice each (checked by an assertion).
//
// Pixels arrive one per cycle in row-major order and are written as they
// come.  After a pixel n has been written, `win` (combinational from the
// RAMs) shows the window whose bottom-right pixel is n:
// win[r][q] = pixel n - (P-1-r)*COLS - (Q-1-q); `win_valid` is high while the
// window lies on received pixels, i.e. n >= (P-1)*COLS + Q-1, for the one
// cycle after pixel n was taken (as in row_buffer).
//
// From the source design: no flip-flops for the mask area, stride-one and
// stride-Q placement, six RAMs for its 3 x 4 example.  This design's own
// choices: it keeps P whole rows (P*COLS pixels instead of the minimum
// (P-1)*COLS + Q) so that the placement is a fixed function of row and
// column, and the new pixel uses a separate write port.
module banked_row_buffer
  import gtm_pkg::*;
#(
  parameter int unsigned P    = 3,
  parameter int unsigned Q    = 4,
  parameter int unsigned COLS = 640
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pix_t in_pix,
  output pix_t win [P][Q],
  output logic win_valid
);

  localparam int unsigned NB   = P * Q / 2;
  localparam int unsigned APR  = (COLS + Q * (P - 1)) / NB + 1;   // words per buffered row
  localparam int unsigned AW   = $clog2(P * APR);
  localparam int unsigned CW   = $clog2(COLS);
  localparam int unsigned RW   = $clog2(P) + 1;
  localparam int unsigned KW   = $clog2(COLS + Q * P);
  localparam int unsigned FILL = (P - 1) * COLS + Q - 1;
  localparam int unsigned NW   = $clog2(FILL + 2);

  pix_t ram [NB][P * APR];

  logic [CW-1:0] col, last_col;   // column of the next / newest pixel
  logic [RW-1:0] rr,  last_rr;    // buffered row of the next / newest pixel
  logic [NW-1:0] seen;

  function automatic int bank_of(input int r, input int j);
    return (j + int'(Q) * r) % int'(NB);
  endfunction
  function automatic int addr_of(input int r, input int j);
    return r * int'(APR) + (j + int'(Q) * r) / int'(NB);
  endfunction

  always_ff @(posedge clk) begin
    if (in_valid) ram[bank_of(int'(rr), int'(col))][AW'(addr_of(int'(rr), int'(col)))] <= in_pix;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; rr <= '0; last_col <= '0; last_rr <= '0; seen <= '0; win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid && (seen >= NW'(FILL));
      if (in_valid) begin
        last_col <= col;
        last_rr  <= rr;
        if (seen <= NW'(FILL)) seen <= seen + 1'b1;
        if (col == CW'(COLS-1)) begin
          col <= '0;
          rr  <= (rr == RW'(P-1)) ? '0 : rr + 1'b1;
        end else col <= col + 1'b1;
      end
    end
  end

  // window read
  int win_bank [P][Q];
  // column and buffered row of mask position (r, q); a window that wraps
  // around a row end takes its left part from the end of the row above
  function automatic int win_col(input int lc, input int q);
    return (lc < int'(Q) - 1 - q) ? lc - (int'(Q) - 1 - q) + int'(COLS) : lc - (int'(Q) - 1 - q);
  endfunction
  function automatic int win_row(input int lr, input int lc, input int r, input int q);
    return (lr - (int'(P) - 1 - r) - ((lc < int'(Q) - 1 - q) ? 1 : 0) + 2 * int'(P)) % int'(P);
  endfunction

  always_comb begin
    for (int r = 0; r < int'(P); r++)
      for (int q = 0; q < int'(Q); q++) begin
        win_bank[r][q] = bank_of(win_row(int'(last_rr), int'(last_col), r, q), win_col(int'(last_col), q));
        win[r][q]      = ram[win_bank[r][q]]
                            [AW'(addr_of(win_row(int'(last_rr), int'(last_col), r, q), win_col(int'(last_col), q)))];
      end
  end

  // every RAM serves at most two reads of a non-wrapping window
  function automatic logic two_per_bank();
    int cnt [NB];
    for (int b = 0; b < int'(NB); b++) cnt[b] = 0;
    for (int r = 0; r < int'(P); r++)
      for (int q = 0; q < int'(Q); q++) cnt[win_bank[r][q]]++;
    for (int b = 0; b < int'(NB); b++) if (cnt[b] > 2) return 1'b0;
    return 1'b1;
  endfunction

  property p_two_reads_per_ram;
    @(posedge clk) disable iff (!rst_n) (win_valid && last_col >= CW'(Q-1)) |-> two_per_bank();
  endproperty
  assert property (p_two_reads_per_ram);

endmodule
