// aesware: the shared AES accelerator. It joins the AESware_Arbiter, which
// schedules the cores, and the AES_Operator, which does the AES work.
//
// Each core has an APB1 port (requests, direction bits) and an APB2 port
// (operator registers). Use by a core:
//   1. write APB1 0x000: {sw_time[15:0], 14'b0, keylen[1:0]};
//   2. poll APB1 0x000 until the direction bits [1:0] are 1 (operator
//      reserved: go on) or 2 (run this AES operation in software);
//   3. on 1: write APB2 TYPE, TEXT words and KEY words, then read the four
//      RESULT words (the reads wait until the result exists).
// The operator is released when its last result word has been read; the
// arbiter then hands it to the next queued core.
//
// The split into arbiter and operator, with an APB port each and the
// operator's idle state (AESware_state) fed back to the arbiter, follows
// the original AESware block diagram.
module aesware
  import aes_pkg::*;
#(
  parameter int unsigned NCORE = 8,
  parameter int unsigned TAGW  = (NCORE > 1) ? $clog2(NCORE) : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t apb1_req [NCORE],
  output apb_rsp_t apb1_rsp [NCORE],
  input  apb_req_t apb2_req [NCORE],
  output apb_rsp_t apb2_rsp [NCORE],
  output logic     aesware_state,
  output logic [TAGW:0] queue_count
);
  logic              req_valid;
  logic [TAGW-1:0]   req_tag;
  logic [1:0]        req_keylen;
  logic [TIME_W-1:0] req_sw_time;
  logic              dec_valid;
  logic [TAGW-1:0]   dec_tag;
  dir_e              dec_dir;
  logic              grant_valid;
  logic [TAGW-1:0]   grant_tag;
  apb_req_t          op_req;
  apb_rsp_t          op_rsp;

  aesware_apb1 #(.NCORE(NCORE), .TAGW(TAGW)) u_apb1 (
    .clk, .rst_n, .apb_req(apb1_req), .apb_rsp(apb1_rsp),
    .req_valid, .req_tag, .req_keylen, .req_sw_time,
    .dec_valid, .dec_tag, .dec_dir
  );

  aesware_arbiter #(.NCORE(NCORE), .TAGW(TAGW)) u_arbiter (
    .clk, .rst_n, .req_valid, .req_tag, .req_keylen, .req_sw_time,
    .op_idle(aesware_state), .out_valid(dec_valid), .out_tag(dec_tag), .out_dir(dec_dir),
    .grant_valid, .grant_tag, .queue_count
  );

  aesware_apb2_mux #(.NCORE(NCORE), .TAGW(TAGW)) u_apb2 (
    .grant_valid, .grant_tag, .core_req(apb2_req), .core_rsp(apb2_rsp),
    .op_req, .op_rsp
  );

  aes_operator u_operator (
    .clk, .rst_n, .apb_req(op_req), .apb_rsp(op_rsp), .state_idle(aesware_state)
  );

endmodule
