// tb_aesware_apb2_mux: for random requests on four core ports, checks that
// only the granted core's request reaches the operator and gets the
// operator's response, that other accessing cores get PSLVERR with
// PREADY high, and that the operator sees an idle bus with no grant.
module tb_aesware_apb2_mux;
  import aes_pkg::*;
  localparam int NCORE = 4;
  logic       grant_valid;
  logic [1:0] grant_tag;
  apb_req_t   core_req [NCORE];
  apb_rsp_t   core_rsp [NCORE];
  apb_req_t   op_req;
  apb_rsp_t   op_rsp;
  int checks = 0, failures = 0;

  aesware_apb2_mux #(.NCORE(NCORE)) dut (.*);

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
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
    for (int n = 0; n < 200; n++) begin
      grant_valid = 1'($urandom);
      grant_tag   = 2'($urandom);
      for (int c = 0; c < NCORE; c++)
        core_req[c] = '{psel: 1'($urandom), penable: 1'($urandom), pwrite: 1'($urandom),
                        paddr: 12'($urandom), pwdata: $urandom};
      op_rsp = '{pready: 1'($urandom), prdata: $urandom, pslverr: 1'($urandom)};
      #1;
      if (grant_valid) chk("operator request", 64'(op_req), 64'(core_req[grant_tag]));
      else             chk("idle operator bus", 64'(op_req), 0);
      for (int c = 0; c < NCORE; c++) begin
        if (grant_valid && grant_tag == 2'(c)) begin
          chk("granted response", 64'(core_rsp[c]), 64'(op_rsp));
        end else begin
          chk("other ready", core_rsp[c].pready, 1);
          chk("other error", core_rsp[c].pslverr, core_req[c].psel & core_req[c].penable);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
