// aesware_system: the AES-enabled multicore subsystem. NCORE cores share
// one AESware; each core's bus goes through its own core_bus_mux, which
// sends AESware accesses directly to the accelerator and everything else
// to the system interconnect.
//
// The cores, the interconnect and the memories and peripherals behind it
// are not part of this RTL: each core's bus enters on core_req/core_rsp
// and each core's interconnect traffic leaves on noc_req/noc_rsp. The
// default of eight cores is the octa-core configuration; the original work also
// builds 1-, 2- and 4-core versions, selected here with NCORE.
// aesware_state is 1 while the AES operator is idle; queue_count is the
// number of requests waiting in the arbiter.
module aesware_system
  import aes_pkg::*;
#(
  parameter int unsigned NCORE    = 8,
  parameter logic [31:0] AWR_BASE = 32'h5000_0000
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t core_req [NCORE],
  output apb_rsp_t core_rsp [NCORE],
  output bus_req_t noc_req  [NCORE],
  input  apb_rsp_t noc_rsp  [NCORE],
  output logic     aesware_state,
  output logic [$clog2(NCORE > 1 ? NCORE : 2):0] queue_count
);
  apb_req_t apb1_req [NCORE];
  apb_rsp_t apb1_rsp [NCORE];
  apb_req_t apb2_req [NCORE];
  apb_rsp_t apb2_rsp [NCORE];

  for (genvar c = 0; c < NCORE; c++) begin : g_core
    core_bus_mux #(.AWR_BASE(AWR_BASE)) u_mux (
      .core_req(core_req[c]), .core_rsp(core_rsp[c]),
      .apb1_req(apb1_req[c]), .apb1_rsp(apb1_rsp[c]),
      .apb2_req(apb2_req[c]), .apb2_rsp(apb2_rsp[c]),
      .noc_req(noc_req[c]),   .noc_rsp(noc_rsp[c])
    );
  end

  aesware #(.NCORE(NCORE)) u_aesware (
    .clk, .rst_n, .apb1_req, .apb1_rsp, .apb2_req, .apb2_rsp, .aesware_state,
    .queue_count
  );

endmodule
