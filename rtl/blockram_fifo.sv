// blockram_fifo -- host-side staging buffer built on a block RAM.
//
// Two of these sit between the host bus and the accelerator: one takes image
// words from the host and feeds them to the memory ports, the other collects
// Round 1 results until the host reads them.  It is a first-in first-out
// queue over a DEPTH-entry memory with wrapping read and write pointers.
//
// Interface: `push`/`wdata` write when not `full`; `rdata` shows the oldest
// entry whenever not `empty` (show-ahead) and `pop` removes it.  A push and
// a pop may happen in the same cycle.  `count` is the occupancy.
//
// The source design only names these buffers; the FIFO behaviour, width and
// depth are this design's choice.
module blockram_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [WIDTH-1:0]       wdata,
  input  logic                   pop,
  output logic [WIDTH-1:0]       rdata,
  output logic                   full,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  assign rdata = mem[rd_ptr];

endmodule
