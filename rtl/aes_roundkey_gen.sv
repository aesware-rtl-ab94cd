// aes_roundkey_gen: AES key expansion for 128-, 192- and 256-bit keys,
// shared by the encoder and the decoder.
//
// On start the Nk key words are copied into the round-key store (one
// cycle), then one new word w[i] = w[i-Nk] ^ temp is produced per cycle
// until 4*(Nr+1) words exist. Which of Rotate, Subbytes and Round Constant
// are applied to temp is not worked out from i % Nk: as in the original design,
// a 20-bit Nk_advisor register, preloaded with a per-key-length pattern,
// is consulted at its LSB and shifted right once per key-expansion step.
// In this design a step is a segment of Nk words (4 words for 256-bit
// keys); on the first word of a segment LSB=1 means Rotate+Subbytes+Rcon
// and LSB=0 means Subbytes only; the other words of the segment use
// temp = w[i-1]. The segment reading of the advisor bits and the patterns
// (0x003FF, 0x000FF, 0x01555) are this design's; the original gives only
// the 20-bit width and the LSB/shift rule. Rcon starts at 8'h01 and is
// advanced with xtime after each use.
//
// Interface: start (1-cycle pulse) with keylen and key (word 0 in
// key[255:224]) valid in that cycle; ready goes high when the last word is
// written and stays high until the next start. rd_round selects a round
// key, returned combinationally on rd_key as {w[4r], .., w[4r+3]}.
// Timing: ready rises 1 + 4*(Nr+1) - Nk cycles after start (41/47/53).
module aes_roundkey_gen
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [1:0]   keylen,
  input  logic [255:0] key,
  output logic         ready,
  input  logic [3:0]   rd_round,
  output logic [127:0] rd_key
);
  localparam logic [19:0] ADV128 = 20'h003FF;
  localparam logic [19:0] ADV192 = 20'h000FF;
  localparam logic [19:0] ADV256 = 20'h01555;

  logic [31:0] w [60];
  logic        busy;
  logic [5:0]  idx;        // index of the word being produced
  logic [5:0]  last_idx;   // 4*(Nr+1)-1
  logic [3:0]  nk;
  logic [2:0]  pos;        // position inside the current segment
  logic [2:0]  seg_last;   // segment length - 1
  logic [19:0] nk_advisor;
  logic [7:0]  rcon;

  logic [31:0] prev, back, sub_in, sub_out, temp;

  assign prev = w[idx - 6'd1];
  assign back = w[idx - 6'(nk)];
  // Rotate moves the first byte to the end when the advisor says so
  assign sub_in = nk_advisor[0] ? {prev[23:0], prev[31:24]} : prev;

  for (genvar b = 0; b < 4; b++) begin : g_sub
    aes_sbox #(.INVERSE(1'b0)) u_sbox (.din(sub_in[8*b +: 8]), .dout(sub_out[8*b +: 8]));
  end

  always_comb begin
    if (pos != 3'd0)         temp = prev;
    else if (nk_advisor[0])  temp = sub_out ^ {rcon, 24'h0};
    else                     temp = sub_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      ready      <= 1'b0;
      idx        <= '0;
      last_idx   <= '0;
      nk         <= 4'd4;
      pos        <= '0;
      seg_last   <= '0;
      nk_advisor <= '0;
      rcon       <= 8'h01;
    end else if (start) begin
      busy     <= 1'b1;
      ready    <= 1'b0;
      nk       <= nk_of(keylen);
      idx      <= 6'(nk_of(keylen));
      last_idx <= 6'(4 * (int'(nr_of(keylen)) + 1) - 1);
      seg_last <= (keylen == KEY128) ? 3'd3 : (keylen == KEY192) ? 3'd5 : 3'd3;
      pos      <= '0;
      rcon     <= 8'h01;
      case (keylen)
        KEY192:  nk_advisor <= ADV192;
        KEY256:  nk_advisor <= ADV256;
        default: nk_advisor <= ADV128;
      endcase
    end else if (busy) begin
      if (pos == 3'd0 && nk_advisor[0]) rcon <= xtime(rcon);
      if (pos == seg_last) begin
        pos        <= '0;
        nk_advisor <= nk_advisor >> 1;
      end else begin
        pos <= pos + 3'd1;
      end
      idx <= idx + 6'd1;
      if (idx == last_idx) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  // Round-key store: written as an array so it can map to a memory.
  always_ff @(posedge clk) begin
    if (start) begin
      for (int k = 0; k < 8; k++) w[k] <= key[255 - 32*k -: 32];
    end else if (busy) begin
      w[idx] <= back ^ temp;
    end
  end

  assign rd_key = {w[{rd_round, 2'd0}], w[{rd_round, 2'd1}],
                   w[{rd_round, 2'd2}], w[{rd_round, 2'd3}]};

endmodule
