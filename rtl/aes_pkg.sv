// aes_pkg: types, constants and functions shared by the AESware blocks.
//
// AES arithmetic: the S-box and inverse S-box tables are computed at
// elaboration from their definition (multiplicative inverse in GF(2^8)
// modulo x^8+x^4+x^3+x+1 followed by the affine transform
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63), so no table
// of numbers is kept in the source. The key-length encoding, the APB
// register map, the direction-bit encoding and the estimated operator
// times used by the scheduler are defined here as well.
//
// The AES state is held as a 128-bit vector in FIPS-197 byte order:
// byte 0 (bits 127:120) is row 0 / column 0, byte 1 is row 1 / column 0,
// and so on column by column.
package aes_pkg;

  // Key length as written in the type register (Get type).
  typedef enum logic [1:0] {
    KEY128 = 2'd0,
    KEY192 = 2'd1,
    KEY256 = 2'd2
  } keylen_e;

  // Operation requested by a core.
  typedef enum logic {
    OP_ENC = 1'b0,
    OP_DEC = 1'b1
  } aes_op_e;

  // Direction bits returned to a core on APB1 (bits [1:0] of the read data).
  typedef enum logic [1:0] {
    DIR_NONE = 2'd0,   // no request pending or still waiting in the queue
    DIR_HW   = 2'd1,   // the operator is reserved for this core: use APB2
    DIR_SW   = 2'd2,   // run this AES operation in software
    DIR_WAIT = 2'd3    // request accepted and queued
  } dir_e;

  // Generic APB (AMBA 3) request and response bundles, 32-bit data.
  typedef struct packed {
    logic        psel;
    logic        penable;
    logic        pwrite;
    logic [11:0] paddr;
    logic [31:0] pwdata;
  } apb_req_t;

  typedef struct packed {
    logic        pready;
    logic [31:0] prdata;
    logic        pslverr;
  } apb_rsp_t;

  // Core-side bus request as seen by the per-core mux (32-bit address).
  typedef struct packed {
    logic        psel;
    logic        penable;
    logic        pwrite;
    logic [31:0] paddr;
    logic [31:0] pwdata;
  } bus_req_t;

  // APB2 (operator) register map, byte addresses.
  localparam logic [11:0] A2_TYPE   = 12'h000;  // [0] op (0 enc, 1 dec), [2:1] keylen
  localparam logic [11:0] A2_TEXT   = 12'h010;  // 4 words, 0x010..0x01C
  localparam logic [11:0] A2_KEY    = 12'h020;  // up to 8 words, 0x020..0x03C
  localparam logic [11:0] A2_STATUS = 12'h040;  // [0] idle, [1] result valid
  localparam logic [11:0] A2_RESULT = 12'h050;  // 4 words, 0x050..0x05C

  // Width of the time fields used by the scheduler (cycles).
  localparam int unsigned TIME_W = 16;

  // Estimated operator time per key length in cycles, used by SJF and the
  // waiting time estimator.
  localparam logic [TIME_W-1:0] EST_128 = 16'd244;
  localparam logic [TIME_W-1:0] EST_192 = 16'd321;
  localparam logic [TIME_W-1:0] EST_256 = 16'd390;

  function automatic logic [TIME_W-1:0] est_time(input logic [1:0] kl);
    case (kl)
      KEY192:  return EST_192;
      KEY256:  return EST_256;
      default: return EST_128;
    endcase
  endfunction

  // Nk (key words) and Nr (rounds) per key length.
  function automatic logic [3:0] nk_of(input logic [1:0] kl);
    case (kl)
      KEY192:  return 4'd6;
      KEY256:  return 4'd8;
      default: return 4'd4;
    endcase
  endfunction

  function automatic logic [3:0] nr_of(input logic [1:0] kl);
    return nk_of(kl) + 4'd6;
  endfunction

  // ---------------------------------------------------------------- GF(2^8)
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  function automatic logic [7:0] ginv(input logic [7:0] a);
    // a^254 = a^-1 (and 0 -> 0)
    logic [7:0] r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, sq);
      sq = gmul(sq, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox_calc(input logic [7:0] a);
    logic [7:0] b;
    b = ginv(a);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
             ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  function automatic logic [255:0][7:0] build_sbox();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(8'(i));
    return t;
  endfunction

  function automatic logic [255:0][7:0] build_inv_sbox();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[sbox_calc(8'(i))] = 8'(i);
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX_T     = build_sbox();
  localparam logic [255:0][7:0] INV_SBOX_T = build_inv_sbox();

  // ------------------------------------------------------ state transforms
  function automatic logic [7:0] st_byte(input logic [127:0] s, input int r, input int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = st_byte(s, r, (c + r) % 4);
    return o;
  endfunction

  function automatic logic [127:0] inv_shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*((c + r) % 4) + r) -: 8] = st_byte(s, r, c);
    return o;
  endfunction

  function automatic logic [31:0] mix_col(input logic [31:0] w);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = w;
    return {xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3),
            (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic logic [31:0] inv_mix_col(input logic [31:0] w);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = w;
    return {gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09),
            gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d),
            gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b),
            gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e)};
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    return {mix_col(s[127:96]), mix_col(s[95:64]), mix_col(s[63:32]), mix_col(s[31:0])};
  endfunction

  function automatic logic [127:0] inv_mix_columns(input logic [127:0] s);
    return {inv_mix_col(s[127:96]), inv_mix_col(s[95:64]),
            inv_mix_col(s[63:32]), inv_mix_col(s[31:0])};
  endfunction

endpackage
