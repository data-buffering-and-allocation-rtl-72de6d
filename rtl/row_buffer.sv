// row_buffer -- full image-row buffering for a P x Q mask: every pixel is
// read from outside once and every mask position is available in parallel.
//
// Pixels arrive one per cycle in row-major order.  The P x Q pixels under
// the mask sit in P shift registers of Q pixels that shift left (towards
// column 0) by one pixel per input pixel.  The bottom register takes the new
// pixel n.  Register i (i < P-1) takes pixel n - (P-1-i)*COLS, read from a
// block-RAM line store, so each cycle P-1 pixels are read from block RAM
// and the new pixel is written into it.  The line store is made of P-1
// dual-ported RAMs of COLS entries, one per row distance; pixels of the same
// column in consecutive rows therefore sit in different RAMs and are read in
// the same cycle.  On chip are (P-1)*COLS + P*Q pixels.
//
// Interface: `in_valid`/`in_pix` feed the stream; `rst_n` restarts it (the
// next pixel is pixel 0).  One cycle after a pixel enters, `win` shows the
// window whose bottom-right pixel is that pixel: win[r][q] is pixel
// n - (P-1-r)*COLS - (Q-1-q).  `win_valid` marks windows that lie wholly on
// already-received pixels (n >= (P-1)*COLS + Q-1); windows that wrap
// around a row end are flagged too, as the caller knows the geometry.
//
// From the source design: the shift registers for the mask area, one
// external pixel and P-1 block-RAM reads per cycle, stride-one placement of
// same-column pixels across RAMs, and the 3 x 4 mask of its example.  The
// per-row RAM split and the output timing are this design's choices.
module row_buffer
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

  localparam int unsigned CW   = $clog2(COLS);
  localparam int unsigned FILL = (P - 1) * COLS + Q - 1;
  localparam int unsigned NW   = $clog2(FILL + 2);

  // line store: lines[i] delays by (i+1)*COLS pixels in total
  pix_t          lines [P-1][COLS];
  pix_t          line_out [P];   // line_out[k]: pixel n - k*COLS
  logic [CW-1:0] col;
  logic [NW-1:0] seen;

  always_comb begin
    line_out[0] = in_pix;
    for (int k = 1; k < int'(P); k++) line_out[k] = lines[k-1][col];
  end

  always_ff @(posedge clk) begin
    if (in_valid)
      for (int k = 0; k < int'(P) - 1; k++) lines[k][col] <= line_out[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      seen      <= '0;
      win_valid <= 1'b0;
      for (int r = 0; r < int'(P); r++)
        for (int q = 0; q < int'(Q); q++) win[r][q] <= '0;
    end else begin
      win_valid <= in_valid && (seen >= NW'(FILL));
      if (in_valid) begin
        col <= (col == CW'(COLS-1)) ? '0 : col + 1'b1;
        if (seen <= NW'(FILL)) seen <= seen + 1'b1;
        for (int r = 0; r < int'(P); r++) begin
          for (int q = 0; q < int'(Q) - 1; q++) win[r][q] <= win[r][q+1];
          win[r][Q-1] <= line_out[P-1-r];
        end
      end
    end
  end

endmodule
