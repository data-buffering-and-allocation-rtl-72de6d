// tb_mem_port_mux -- drives three random requests and every owner code and
// checks that exactly the owner's request reaches the memory port.
module tb_mem_port_mux;
  import gtm_pkg::*;

  owner_e owner;
  mem_req_t host_req, r0_req, r1_req, mem_req;

  mem_port_mux dut (.owner, .host_req, .r0_req, .r1_req, .mem_req);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      mem_req_t e;
      host_req = mem_req_t'({$urandom, $urandom, $urandom});
      r0_req   = mem_req_t'({$urandom, $urandom, $urandom});
      r1_req   = mem_req_t'({$urandom, $urandom, $urandom});
      case (i % 3)
        0: begin owner = OWN_HOST; e = host_req; end
        1: begin owner = OWN_R0;   e = r0_req;   end
        default: begin owner = OWN_R1; e = r1_req; end
      endcase
      #1;
      checks++;
      if (mem_req !== e) begin failures++; $display("owner %s: wrong request", owner.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
