// gf_mul_karatsuba: GF(2^8) multiplier with one level of Karatsuba
// decomposition.
//
// The operands are split into 4-bit halves, a = aL*x^4 + aR and
// b = bL*x^4 + bR. Three 4x4 carry-less products are formed,
//   H = aL*bL,  L = aR*bR,  M = (aL^aR)*(bL^bR),
// and combined as H*x^8 ^ (M ^ H ^ L)*x^4 ^ L into the 15-bit product, which
// gf_reduce folds with the AES polynomial. Three 4x4 products replace the
// four an 8x8 schoolbook product would need. Purely combinational. The
// decomposition follows the document's Karatsuba diagram.
module gf_mul_karatsuba
  import aes_sbox_pkg::*;
(
  input  byte_t a_i,
  input  byte_t b_i,
  output byte_t p_o
);

  function automatic logic [6:0] clmul4(logic [3:0] x, logic [3:0] y);
    logic [6:0] r;
    r = '0;
    for (int i = 0; i < 4; i++) r = r ^ ({3'b0, x & {4{y[i]}}} << i);
    return r;
  endfunction

  logic [6:0]  hh, ll, mm;
  logic [14:0] prod;

  always_comb begin
    hh   = clmul4(a_i[7:4], b_i[7:4]);
    ll   = clmul4(a_i[3:0], b_i[3:0]);
    mm   = clmul4(a_i[7:4] ^ a_i[3:0], b_i[7:4] ^ b_i[3:0]);
    prod = ({8'b0, ll}) ^ ({4'b0, mm ^ hh ^ ll, 4'b0}) ^ ({hh, 8'b0});
  end

  gf_reduce u_red (.prod_i(prod), .res_o(p_o));

endmodule
