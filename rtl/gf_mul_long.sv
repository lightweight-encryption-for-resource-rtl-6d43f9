// gf_mul_long: GF(2^8) multiplier in the "long multiplication" form.
//
// Eight partial products, each the multiplicand ANDed with one multiplier
// bit and shifted by that bit's position, are XORed into a 15-bit carry-less
// product; gf_reduce then folds bits 14..8 back with the AES polynomial.
// Purely combinational: a_i, b_i in, p_o = a_i * b_i in GF(2^8) out.
// The structure follows the document's long multiplier and modulus diagram.
module gf_mul_long
  import aes_sbox_pkg::*;
(
  input  byte_t a_i,
  input  byte_t b_i,
  output byte_t p_o
);

  logic [14:0] prod;

  always_comb begin
    prod = '0;
    for (int i = 0; i < 8; i++) begin
      prod = prod ^ ({7'b0, a_i & {8{b_i[i]}}} << i);
    end
  end

  gf_reduce u_red (.prod_i(prod), .res_o(p_o));

endmodule
