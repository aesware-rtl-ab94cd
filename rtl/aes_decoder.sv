// aes_decoder: iterative AES decryption, one transformation per cycle.
//
// The FSM follows the decoder column of the original AESware operation chart:
// IDLE -> GET_CIPHER (load the state) -> ADDROUNDKEY with the last round
// key Nr, then INV_SHIFTROWS -> INV_SUBBYTES -> ADDROUNDKEY, and while the
// guide bit (Count < Nr) is 1, INV_MIXCOLUMNS before the next
// INV_SHIFTROWS. Count is incremented by every AddRoundKey, and the
// AddRoundKey of pass Count uses round key Nr-Count. When guide is 0 the
// AddRoundKey is the last step and the FSM returns to IDLE with the plain
// text in result.
//
// Interface and timing are those of aes_encoder: enable is a 1-cycle start
// pulse in IDLE, round keys come in through rk_round / rk, done pulses
// 4*Nr+2 cycles after enable (42, 50, 58 cycles).
module aes_decoder
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic [1:0]   keylen,
  input  logic [127:0] text,
  output logic [3:0]   rk_round,
  input  logic [127:0] rk,
  output logic         busy,
  output logic         done,
  output logic [127:0] result
);
  typedef enum logic [2:0] {
    S_IDLE, S_GET_CIPHER, S_ARK1, S_ISHIFT, S_ISUB, S_ARK, S_IMIX
  } dec_state_e;

  dec_state_e   state;
  logic [127:0] st;
  logic [127:0] txt;
  logic [3:0]   count;
  logic [3:0]   nr;
  logic         guide;
  logic [127:0] isub_out;

  assign guide = (count < nr);
  assign busy  = (state != S_IDLE);

  for (genvar b = 0; b < 16; b++) begin : g_sbox
    aes_sbox #(.INVERSE(1'b1)) u_sbox (.din(st[8*b +: 8]), .dout(isub_out[8*b +: 8]));
  end

  always_comb rk_round = (state == S_ARK1) ? nr : (nr - count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      st     <= '0;
      txt    <= '0;
      count  <= '0;
      nr     <= 4'd10;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (enable) begin
          txt   <= text;
          nr    <= nr_of(keylen);
          state <= S_GET_CIPHER;
        end
        S_GET_CIPHER: begin
          st    <= txt;
          count <= '0;
          state <= S_ARK1;
        end
        S_ARK1: begin
          st    <= st ^ rk;
          count <= 4'd1;
          state <= S_ISHIFT;
        end
        S_ISHIFT: begin
          st    <= inv_shift_rows(st);
          state <= S_ISUB;
        end
        S_ISUB: begin
          st    <= isub_out;
          state <= S_ARK;
        end
        S_ARK: begin
          st    <= st ^ rk;
          count <= count + 4'd1;
          if (guide) begin
            state <= S_IMIX;
          end else begin
            state  <= S_IDLE;
            result <= st ^ rk;
            done   <= 1'b1;
          end
        end
        S_IMIX: begin
          st    <= inv_mix_columns(st);
          state <= S_ISHIFT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
