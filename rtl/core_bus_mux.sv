// core_bus_mux: the per-core mux that sends a core's peripheral accesses
// either straight to AESware or to the system interconnect.
//
// Accesses whose address falls in the AESware window (AWR_BASE, 8 KiB)
// bypass the interconnect: offsets 0x0000-0x0FFF go to the APB1 port and
// 0x1000-0x1FFF to the APB2 port, with the low 12 address bits passed on.
// All other accesses are passed unchanged to the interconnect port. The
// response of the selected side is returned to the core. Purely
// combinational.
//
// The original design shows one such mux per core so that AES traffic avoids the
// latency and congestion of the interconnect; the address window, its
// base and the APB-style core bus are this design's choices.
module core_bus_mux
  import aes_pkg::*;
#(
  parameter logic [31:0] AWR_BASE = 32'h5000_0000
) (
  input  bus_req_t core_req,
  output apb_rsp_t core_rsp,
  output apb_req_t apb1_req,
  input  apb_rsp_t apb1_rsp,
  output apb_req_t apb2_req,
  input  apb_rsp_t apb2_rsp,
  output bus_req_t noc_req,
  input  apb_rsp_t noc_rsp
);
  logic hit_awr;
  apb_req_t local_req;

  assign hit_awr   = (core_req.paddr[31:13] == AWR_BASE[31:13]);
  assign local_req = '{psel: core_req.psel, penable: core_req.penable, pwrite: core_req.pwrite,
                       paddr: core_req.paddr[11:0], pwdata: core_req.pwdata};

  always_comb begin
    apb1_req = '0;
    apb2_req = '0;
    noc_req  = '0;
    core_rsp = noc_rsp;
    if (!hit_awr) begin
      noc_req = core_req;
    end else if (!core_req.paddr[12]) begin
      apb1_req = local_req;
      core_rsp = apb1_rsp;
    end else begin
      apb2_req = local_req;
      core_rsp = apb2_rsp;
    end
  end
endmodule
