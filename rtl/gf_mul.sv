// gf_mul: GF(2^8) multiplier that picks one of the two multiplier forms.
//
// KARATSUBA = 1 (default) instantiates gf_mul_karatsuba, the form the
// document uses inside its Fermat-inverse S-Boxes; KARATSUBA = 0 the long
// multiplier gf_mul_long. Combinational.
module gf_mul
  import aes_sbox_pkg::*;
#(
  parameter bit KARATSUBA = 1'b1
) (
  input  byte_t a_i,
  input  byte_t b_i,
  output byte_t p_o
);

  if (KARATSUBA) begin : g_kara
    gf_mul_karatsuba u_mul (.a_i(a_i), .b_i(b_i), .p_o(p_o));
  end else begin : g_long
    gf_mul_long u_mul (.a_i(a_i), .b_i(b_i), .p_o(p_o));
  end

endmodule
