// active_point_fifo -- holds a mask's active points and replays them.
//
// Instead of buffering image rows, the sparse mask is stored on chip as its
// list of active points and the image is read from external memory in the
// order the list gives.  The list is written once (push) and then replayed:
// every `pop` presents the next point and wraps to the first after the last,
// so the same sequence repeats for every window group.
//
// Interface: `clear` empties the list; `push`/`wr_point` append an entry
// (ignored when full); `rewind` restarts the replay.  `rd_point`, `rd_idx`,
// `rd_first` and `rd_last` describe the current point and are valid when
// `count` > 0; `pop` advances.  Reads are combinational.
//
// The source design lists a FIFO for the active pixels among the Round 0
// components without describing it; the recirculating list is this design's
// reading of it.
module active_point_fifo
  import gtm_pkg::*;
#(
  parameter int unsigned DEPTH = R0_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     push,
  input  apoint_t                  wr_point,
  input  logic                     rewind,
  input  logic                     pop,
  output apoint_t                  rd_point,
  output logic [$clog2(DEPTH)-1:0] rd_idx,
  output logic                     rd_first,
  output logic                     rd_last,
  output logic [$clog2(DEPTH):0]   count
);

  apoint_t mem [DEPTH];
  logic [$clog2(DEPTH)-1:0] rd_ptr;

  always_ff @(posedge clk) begin
    if (push && count < ($clog2(DEPTH)+1)'(DEPTH))
      mem[count[$clog2(DEPTH)-1:0]] <= wr_point;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      rd_ptr <= '0;
    end else if (clear) begin
      count  <= '0;
      rd_ptr <= '0;
    end else begin
      if (push && count < ($clog2(DEPTH)+1)'(DEPTH)) count <= count + 1'b1;
      if (rewind)
        rd_ptr <= '0;
      else if (pop && count != '0)
        rd_ptr <= rd_last ? '0 : rd_ptr + 1'b1;
    end
  end

  assign rd_point = mem[rd_ptr];
  assign rd_idx   = rd_ptr;
  assign rd_first = (rd_ptr == '0);
  assign rd_last  = ({1'b0, rd_ptr} == count - 1'b1);

endmodule
