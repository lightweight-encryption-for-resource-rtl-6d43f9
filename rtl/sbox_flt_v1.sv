// sbox_flt_v1: single-cycle AES S-Box that computes the inverse by Fermat's
// little theorem (FLT V1).
//
// x^-1 = x^254 is built by one chain of eleven GF(2^8) multipliers, squares
// included, as in the document's single-cycle exponent chain:
//   x2 = x*x, x3 = x2*x, x6 = x3^2, x12 = x6^2, x15 = x12*x3, x30 = x15^2,
//   x60 = x30^2, x120 = x60^2, x126 = x120*x6, x127 = x126*x, x254 = x127^2
// followed by the affine transform; the result is registered. Latency 1, one
// byte per clock, with a long combinational path. Zero maps to zero as the
// S-Box requires (0^254 = 0). KARATSUBA selects the multiplier form
// (Karatsuba by default, as in the document). en_i low freezes the output.
module sbox_flt_v1
  import aes_sbox_pkg::*;
#(
  parameter bit KARATSUBA = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en_i,
  input  logic  valid_i,
  input  byte_t data_i,
  output logic  valid_o,
  output byte_t data_o
);

  byte_t x2, x3, x6, x12, x15, x30, x60, x120, x126, x127, x254, res;

  gf_mul #(.KARATSUBA(KARATSUBA)) u_m2   (.a_i(data_i), .b_i(data_i), .p_o(x2));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m3   (.a_i(x2),     .b_i(data_i), .p_o(x3));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m6   (.a_i(x3),     .b_i(x3),     .p_o(x6));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m12  (.a_i(x6),     .b_i(x6),     .p_o(x12));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m15  (.a_i(x12),    .b_i(x3),     .p_o(x15));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m30  (.a_i(x15),    .b_i(x15),    .p_o(x30));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m60  (.a_i(x30),    .b_i(x30),    .p_o(x60));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m120 (.a_i(x60),    .b_i(x60),    .p_o(x120));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m126 (.a_i(x120),   .b_i(x6),     .p_o(x126));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m127 (.a_i(x126),   .b_i(data_i), .p_o(x127));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m254 (.a_i(x127),   .b_i(x127),   .p_o(x254));

  sbox_affine u_aff (.y_i(x254), .res_o(res));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      data_o  <= '0;
    end else if (en_i) begin
      valid_o <= valid_i;
      data_o  <= res;
    end
  end

endmodule
