// aes_sbox: one AES byte substitution, forward (SubBytes) or inverse
// (InvSubBytes) selected by the INVERSE parameter.
//
// The lookup reads a 256-entry constant table that aes_pkg computes at
// elaboration from the S-box definition (GF(2^8) inverse plus affine
// transform), so it synthesizes to a small ROM. Purely combinational:
// dout follows din in the same cycle.
//
// The original design places an Sbox and an Inv.Sbox next to the Rcon logic in
// the round-key generator; sharing one table module among the key
// generator, the encoder and the decoder is this design's choice.
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic [7:0] din,
  output logic [7:0] dout
);
  always_comb begin
    if (INVERSE) dout = INV_SBOX_T[din];
    else         dout = SBOX_T[din];
  end
endmodule
