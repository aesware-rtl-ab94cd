// aes_operator: the AES_Operator of AESware, an APB2 slave that encrypts or
// decrypts one 128-bit block with a 128-, 192- or 256-bit key.
//
// A core writes the type, the four text words and the Nk key words through
// the input router. The last key word starts the round-key generator;
// when all round keys exist the encoder or the decoder (chosen by the
// type) is enabled, and its result is taken through an output mux into a
// result register. The core then reads the four result words; reads of a
// result word before the result exists are held with PREADY low (wait
// states), so a core may issue them right after the key. When all four
// words have been read the operator is idle again and AESware_state
// (state_idle) is 1, which tells the arbiter that the next core may be
// served.
//
// Register map (aes_pkg): TYPE 0x000, TEXT 0x010-0x01C, KEY 0x020-0x03C,
// STATUS 0x040 ([0] idle, [1] result valid), RESULT 0x050-0x05C.
// Timing, counted from the clock edge that takes the last key write: the
// round keys take 1+4*(Nr+1)-Nk cycles, the encoder or decoder 4*Nr+2,
// and 2 cycles are hand-over, so the result can be read 85/99/113 cycles
// later for 128/192/256-bit keys. AESware_state drops in the cycle after
// the last key write.
// The staging (type, text, key, round keys, encoder/decoder, APB2 output)
// follows the original AESware design; the register map and wait-state behaviour are
// this design's.
module aes_operator
  import aes_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t apb_req,
  output apb_rsp_t apb_rsp,
  output logic     state_idle
);
  typedef enum logic [1:0] {O_IDLE, O_KEYEXP, O_CRYPT, O_RESULT} op_state_e;

  op_state_e    state;
  logic         wr_en, rd_en, wr_err;
  aes_op_e      op;
  keylen_e      keylen;
  logic [127:0] text, result, enc_res, dec_res;
  logic [255:0] key;
  logic         start, rk_ready, enc_done, dec_done, enc_busy, dec_busy;
  logic [3:0]   rk_round, enc_round, dec_round;
  logic [127:0] rk;
  logic [3:0]   read_mask;
  logic         is_result, is_status;

  assign wr_en = apb_req.psel && apb_req.penable && apb_req.pwrite;
  assign rd_en = apb_req.psel && apb_req.penable && !apb_req.pwrite;

  aes_input_router u_router (
    .clk, .rst_n, .wr_en, .addr(apb_req.paddr), .wdata(apb_req.pwdata),
    .accept(state == O_IDLE), .wr_err, .op, .keylen, .text, .key, .start
  );

  aes_roundkey_gen u_rkgen (
    .clk, .rst_n, .start, .keylen(keylen), .key, .ready(rk_ready),
    .rd_round(rk_round), .rd_key(rk)
  );

  logic enc_en, dec_en;
  assign enc_en = (state == O_KEYEXP) && rk_ready && (op == OP_ENC);
  assign dec_en = (state == O_KEYEXP) && rk_ready && (op == OP_DEC);

  aes_encoder u_enc (
    .clk, .rst_n, .enable(enc_en), .keylen(keylen), .text, .rk_round(enc_round), .rk,
    .busy(enc_busy), .done(enc_done), .result(enc_res)
  );

  aes_decoder u_dec (
    .clk, .rst_n, .enable(dec_en), .keylen(keylen), .text, .rk_round(dec_round), .rk,
    .busy(dec_busy), .done(dec_done), .result(dec_res)
  );

  assign rk_round = (op == OP_DEC) ? dec_round : enc_round;

  assign is_result = (apb_req.paddr[11:4] == A2_RESULT[11:4]);
  assign is_status = (apb_req.paddr == A2_STATUS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= O_IDLE;
      result    <= '0;
      read_mask <= '0;
    end else begin
      case (state)
        O_IDLE:   if (start) state <= O_KEYEXP;
        O_KEYEXP: if (rk_ready) state <= O_CRYPT;
        O_CRYPT: begin
          // output mux: encoder or decoder result, as chosen by the type
          if (enc_done || dec_done) begin
            result    <= (op == OP_DEC) ? dec_res : enc_res;
            read_mask <= '0;
            state     <= O_RESULT;
          end
        end
        O_RESULT: begin
          if (rd_en && is_result) begin
            read_mask[apb_req.paddr[3:2]] <= 1'b1;
            if ((read_mask | (4'b0001 << apb_req.paddr[3:2])) == 4'hF) state <= O_IDLE;
          end
        end
        default: state <= O_IDLE;
      endcase
    end
  end

  assign state_idle = (state == O_IDLE) && !start;

  always_comb begin
    apb_rsp = '{pready: 1'b1, prdata: 32'h0, pslverr: 1'b0};
    if (wr_en) begin
      apb_rsp.pslverr = wr_err;
    end else if (rd_en) begin
      if (is_status) begin
        apb_rsp.prdata = {30'h0, state == O_RESULT, state == O_IDLE};
      end else if (is_result && apb_req.paddr[1:0] == 2'b00) begin
        if (state == O_RESULT)
          apb_rsp.prdata = result[127 - 32*apb_req.paddr[3:2] -: 32];
        else if (state == O_IDLE && !start)
          apb_rsp.pslverr = 1'b1;          // nothing to read
        else
          apb_rsp.pready = 1'b0;           // wait until the result exists
      end else begin
        apb_rsp.pslverr = 1'b1;
      end
    end
  end

  // Only one of the two engines may run at a time.
  a_one_engine: assert property (@(posedge clk) disable iff (!rst_n) !(enc_busy && dec_busy));

endmodule
