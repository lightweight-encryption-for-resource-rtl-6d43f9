// sbox_affine: AES S-Box affine transform, combinational.
//
// res = y ^ rotl(y,1) ^ rotl(y,2) ^ rotl(y,3) ^ rotl(y,4) ^ 0x63, applied to
// the multiplicative inverse y. The document writes the four terms as
// shifts; they are rotations within the byte, which is what makes the
// result the AES S-Box.
module sbox_affine
  import aes_sbox_pkg::*;
(
  input  byte_t y_i,
  output byte_t res_o
);

  function automatic byte_t rotl8(byte_t v, int unsigned s);
    return byte_t'((v << s) | (v >> (8 - s)));
  endfunction

  assign res_o = y_i ^ rotl8(y_i, 1) ^ rotl8(y_i, 2) ^ rotl8(y_i, 3) ^ rotl8(y_i, 4)
               ^ AFFINE_C;

endmodule
