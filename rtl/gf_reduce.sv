// gf_reduce: reduction of a 15-bit carry-less product modulo the AES
// polynomial x^8 + x^4 + x^3 + x + 1, combinational.
//
// Works from bit 14 down to bit 8: wherever the running value has a one in
// bit k, the polynomial shifted left by k-8 is XORed in, clearing that bit.
// This is the modulus half of the "long" multiplier of the document; both
// multipliers share it.
module gf_reduce
  import aes_sbox_pkg::*;
(
  input  logic [14:0] prod_i,
  output byte_t       res_o
);

  logic [14:0] r;

  always_comb begin
    r = prod_i;
    for (int k = 14; k >= 8; k--) begin
      if (r[k]) r = r ^ (15'(GF_POLY) << (k - 8));
    end
    res_o = r[7:0];
  end

endmodule
