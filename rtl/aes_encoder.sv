// aes_encoder: iterative AES encryption, one transformation per cycle.
//
// The FSM follows the encoder column of the original AESware operation chart:
// IDLE -> GET_TEXT (load the 4x4 state) -> ADDROUNDKEY with round key 0,
// then SUBBYTES -> SHIFTROWS -> MIXCOLUMNS -> ADDROUNDKEY repeated.
// Count is incremented by every AddRoundKey; the guide bit is Count < Nr.
// While guide is 1 the round includes MixColumns and another round
// follows; when guide is 0 the round goes SHIFTROWS -> ADDROUNDKEY and the
// FSM returns to IDLE with the cipher text in result.
//
// Interface: enable is a 1-cycle start pulse taken in IDLE, with text and
// keylen valid in that cycle; round keys are read from the round-key
// generator through rk_round / rk (combinational read). done pulses for
// one cycle when result is valid; result holds until the next enable.
// Timing: done is high 4*Nr+2 cycles after enable (42, 50, 58 cycles).
module aes_encoder
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
    S_IDLE, S_GET_TEXT, S_ARK1, S_SUB, S_SHIFT, S_MIX, S_ARK
  } enc_state_e;

  enc_state_e   state;
  logic [127:0] st;
  logic [127:0] txt;
  logic [3:0]   count;
  logic [3:0]   nr;
  logic         guide;
  logic [127:0] sub_out;

  assign guide = (count < nr);
  assign busy  = (state != S_IDLE);

  for (genvar b = 0; b < 16; b++) begin : g_sbox
    aes_sbox #(.INVERSE(1'b0)) u_sbox (.din(st[8*b +: 8]), .dout(sub_out[8*b +: 8]));
  end

  always_comb rk_round = (state == S_ARK1) ? 4'd0 : count;

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
          state <= S_GET_TEXT;
        end
        S_GET_TEXT: begin
          st    <= txt;
          count <= '0;
          state <= S_ARK1;
        end
        S_ARK1: begin
          st    <= st ^ rk;
          count <= 4'd1;
          state <= S_SUB;
        end
        S_SUB: begin
          st    <= sub_out;
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          st    <= shift_rows(st);
          state <= guide ? S_MIX : S_ARK;
        end
        S_MIX: begin
          st    <= mix_columns(st);
          state <= S_ARK;
        end
        S_ARK: begin
          st    <= st ^ rk;
          count <= count + 4'd1;
          if (guide) begin
            state <= S_SUB;
          end else begin
            state  <= S_IDLE;
            result <= st ^ rk;
            done   <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
