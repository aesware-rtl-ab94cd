// aesware_apb2_mux: the APB2 port of AESware. It connects the one core the
// arbiter has reserved the AES operator for to the operator's APB slave.
//
// While grant_valid is high, the request of core grant_tag is passed to the
// operator and the operator's response goes back to that core. Any other
// core that accesses APB2 (and every core while nothing is granted) gets an
// immediate PSLVERR, so no core can disturb another core's operation. The
// operator sees an idle bus when nothing is granted.
//
// The original design shows the cores reaching the operator over APB2 once the
// arbiter has named them; the error response for other cores is this
// design's choice. Purely combinational.
module aesware_apb2_mux
  import aes_pkg::*;
#(
  parameter int unsigned NCORE = 8,
  parameter int unsigned TAGW  = (NCORE > 1) ? $clog2(NCORE) : 1
) (
  input  logic            grant_valid,
  input  logic [TAGW-1:0] grant_tag,
  input  apb_req_t        core_req [NCORE],
  output apb_rsp_t        core_rsp [NCORE],
  output apb_req_t        op_req,
  input  apb_rsp_t        op_rsp
);
  always_comb begin
    op_req = '0;
    for (int c = 0; c < NCORE; c++) begin
      core_rsp[c] = '{pready: 1'b1, prdata: 32'h0, pslverr: 1'b0};
      if (grant_valid && grant_tag == TAGW'(c)) begin
        op_req      = core_req[c];
        core_rsp[c] = op_rsp;
      end else if (core_req[c].psel && core_req[c].penable) begin
        core_rsp[c].pslverr = 1'b1;
      end
    end
  end
endmodule
