// tb_core_bus_mux: drives random accesses inside and outside the AESware
// window and checks where each one goes: 0x0000-0x0FFF of the window to
// APB1, 0x1000-0x1FFF to APB2 (low 12 address bits kept), everything else
// unchanged to the interconnect, with the matching response returned.
module tb_core_bus_mux;
  import aes_pkg::*;
  bus_req_t core_req, noc_req;
  apb_rsp_t core_rsp, apb1_rsp, apb2_rsp, noc_rsp;
  apb_req_t apb1_req, apb2_req;
  int checks = 0, failures = 0;

  core_bus_mux dut (.*);

  task automatic chk(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      int kind;
      apb_req_t exp_local;
      kind = n % 3;
      core_req = '{psel: 1, penable: 1'($urandom), pwrite: 1'($urandom), paddr: $urandom, pwdata: $urandom};
      if (kind == 0) core_req.paddr = 32'h5000_0000 | 32'($urandom % 32'h1000);
      if (kind == 1) core_req.paddr = 32'h5000_1000 | 32'($urandom % 32'h1000);
      if (kind == 2 && core_req.paddr[31:13] == 19'h28000) core_req.paddr[31] = 1'b0;
      apb1_rsp = '{pready: 1'($urandom), prdata: $urandom, pslverr: 1'($urandom)};
      apb2_rsp = '{pready: 1'($urandom), prdata: $urandom, pslverr: 1'($urandom)};
      noc_rsp  = '{pready: 1'($urandom), prdata: $urandom, pslverr: 1'($urandom)};
      exp_local = '{psel: core_req.psel, penable: core_req.penable, pwrite: core_req.pwrite,
                    paddr: core_req.paddr[11:0], pwdata: core_req.pwdata};
      #1;
      case (kind)
        0: begin
          chk("apb1 req", 128'(apb1_req), 128'(exp_local));
          chk("apb1 rsp", 128'(core_rsp), 128'(apb1_rsp));
          chk("apb2 idle", apb2_req.psel, 0);
          chk("noc idle", noc_req.psel, 0);
        end
        1: begin
          chk("apb2 req", 128'(apb2_req), 128'(exp_local));
          chk("apb2 rsp", 128'(core_rsp), 128'(apb2_rsp));
          chk("apb1 idle", apb1_req.psel, 0);
          chk("noc idle", noc_req.psel, 0);
        end
        default: begin
          chk("noc req", 128'(noc_req), 128'(core_req));
          chk("noc rsp", 128'(core_rsp), 128'(noc_rsp));
          chk("apb1 idle", apb1_req.psel, 0);
          chk("apb2 idle", apb2_req.psel, 0);
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
