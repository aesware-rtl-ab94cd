// aes_input_router: the Input Router with the Get type, Get text and Get
// key registers of the AES operator.
//
// Each APB2 write is routed by its address: A2_TYPE sets the operation
// (bit 0: 0 encrypt, 1 decrypt) and the key length (bits 2:1), A2_TEXT+4*k
// sets text word k (k = 0..3, word 0 is the most significant), A2_KEY+4*k
// sets key word k (k = 0..7). Writing key word Nk-1 (the last word of the
// key length currently held in the type register) completes the input and
// raises start for one cycle. Writes are only taken while accept is high
// (the operator is idle); a write that is refused or hits no register
// raises wr_err in the same cycle, to be returned as PSLVERR.
//
// The original AESware design names the three Get stages and says the router decides
// which one an input belongs to; the address map and the start rule are
// this design's choice. start comes one cycle after the completing write.
module aes_input_router
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [11:0]  addr,
  input  logic [31:0]  wdata,
  input  logic         accept,
  output logic         wr_err,
  output aes_op_e      op,
  output keylen_e      keylen,
  output logic [127:0] text,
  output logic [255:0] key,
  output logic         start
);
  logic is_type, is_text, is_key;
  logic [2:0] word;

  assign word    = addr[4:2];
  assign is_type = (addr == A2_TYPE);
  assign is_text = (addr[11:4] == A2_TEXT[11:4]) && (addr[1:0] == 2'b00);
  assign is_key  = (addr[11:5] == A2_KEY[11:5]) && (addr[1:0] == 2'b00);
  assign wr_err  = wr_en && (!accept || !(is_type || is_text || is_key) ||
                             (is_type && wdata[2:1] == 2'b11));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op     <= OP_ENC;
      keylen <= KEY128;
      text   <= '0;
      key    <= '0;
      start  <= 1'b0;
    end else begin
      start <= 1'b0;
      if (wr_en && !wr_err) begin
        if (is_type) begin
          op     <= aes_op_e'(wdata[0]);
          keylen <= keylen_e'(wdata[2:1]);
        end
        if (is_text) text[127 - 32*word[1:0] -: 32] <= wdata;
        if (is_key) begin
          key[255 - 32*word -: 32] <= wdata;
          if ({1'b0, word} == nk_of(keylen) - 4'd1) start <= 1'b1;
        end
      end
    end
  end
endmodule
