// mem_port_mux -- selects which unit drives one external memory port.
//
// Each SRAM port is shared by three units: the host load path, the Round 0
// unit attached to that port, and the Round 1 unit.  Only one of them runs
// at a time, so the selection is a registered owner code, not an arbiter.
// Read data goes back to all units unchanged; a unit ignores it unless it
// owns the port.
//
// Interface: `owner` picks the request passed to `mem_req`.  Combinational.
// The three-input multiplexer in front of every memory follows the source
// design's block diagram; the owner encoding is this design's choice.
module mem_port_mux
  import gtm_pkg::*;
(
  input  owner_e   owner,
  input  mem_req_t host_req,
  input  mem_req_t r0_req,
  input  mem_req_t r1_req,
  output mem_req_t mem_req
);

  always_comb begin
    unique case (owner)
      OWN_R0:  mem_req = r0_req;
      OWN_R1:  mem_req = r1_req;
      default: mem_req = host_req;
    endcase
  end

endmodule
