// sram_model -- behavioural model of one external 32-bit synchronous SRAM.
//
// Stands in for the board memories in simulation only.  A request with
// `we` writes `wdata`; a read request returns the word on `rdata` on the next
// cycle.  The array starts at zero.  Testbenches may reach `mem` directly
// to preload or inspect contents.
module sram_model
  import gtm_pkg::*;
#(
  parameter int unsigned WORDS = 2 ** ADDR_W
) (
  input  logic     clk,
  input  mem_req_t req,
  output word_t    rdata
);

  word_t mem [WORDS];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
    rdata = '0;
  end

  always @(posedge clk) begin
    if (req.req) begin
      if (req.we) mem[req.addr] <= req.wdata;
      else        rdata <= mem[req.addr];
    end
  end

endmodule
