// tb_aes_vec_pkg: known-answer vectors of the AES standard (FIPS-197,
// appendices A and C) used by the testbenches as independent references.
package tb_aes_vec_pkg;
  // Appendix C: plain text and keys 00 01 02 ... for the three key lengths
  localparam logic [127:0] C_PT    = 128'h00112233445566778899aabbccddeeff;
  localparam logic [255:0] C_KEY   = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
  localparam logic [127:0] C_CT128 = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
  localparam logic [127:0] C_CT192 = 128'hdda97ca4864cdfe06eaf70a0ec0d7191;
  localparam logic [127:0] C_CT256 = 128'h8ea2b7ca516745bfeafc49904b496089;

  function automatic logic [127:0] c_ct(input int kl);
    case (kl)
      1:       return C_CT192;
      2:       return C_CT256;
      default: return C_CT128;
    endcase
  endfunction

  // Key used by the standard for a key length, left-aligned in 256 bits
  function automatic logic [255:0] c_key(input int kl);
    case (kl)
      1:       return {C_KEY[255:64], 64'h0};
      2:       return C_KEY;
      default: return {C_KEY[255:128], 128'h0};
    endcase
  endfunction

  // Appendix A: key expansion examples, key and last round key
  localparam logic [255:0] A_KEY128 = {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0};
  localparam logic [127:0] A_LAST128 = 128'hd014f9a8c9ee2589e13f0cc8b6630ca6;
  localparam logic [255:0] A_KEY192 = {192'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, 64'h0};
  localparam logic [127:0] A_LAST192 = 128'he98ba06f448c773c8ecc720401002202;
  localparam logic [255:0] A_KEY256 = 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;
  localparam logic [127:0] A_LAST256 = 128'hfe4890d1e6188d0b046df344706c631e;
endpackage
