// sbox_flt_v3: 11-stage pipeline-parallel Fermat-inverse AES S-Box (FLT V3).
//
// A shorter pipeline than sbox_flt_v2, bought with more multipliers per
// stage: a chain of squarings (x2, x4, ... x64) runs beside the chain
// x3 -> x6 -> x12 -> x15 -> ... -> x60, and the two meet in x124 = x64*x60.
// What each stage register holds follows the document's pipeline-parallel
// diagram:
//   s1: x             s2: x2, x          s3: x2, x3        s4: x4, x6, x3
//   s5: x8, x12, x3   s6: x16, x15, x3   s7: x32, x30, x3  s8: x64, x60, x3
//   s9: x124, x3      s10: x127          s11: x254
// The affine transform is applied combinationally to the stage-11 register:
// latency 11, one byte per clock. en_i low freezes every stage. Reset
// (active low, asynchronous) clears the valid pipeline and data registers.
module sbox_flt_v3
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

  localparam int unsigned STAGES = 11;

  byte_t s1_x1;
  byte_t s2_x2, s2_x1;
  byte_t s3_x2, s3_x3;
  byte_t s4_x4, s4_x6, s4_x3;
  byte_t s5_x8, s5_x12, s5_x3;
  byte_t s6_x16, s6_x15, s6_x3;
  byte_t s7_x32, s7_x30, s7_x3;
  byte_t s8_x64, s8_x60, s8_x3;
  byte_t s9_x124, s9_x3;
  byte_t s10_x127;
  byte_t s11_x254;
  logic [STAGES-1:0] vld_q;

  byte_t m2, m3, m4, m6, m8, m12, m16, m15, m32, m30, m64, m60, m124, m127, m254;

  gf_mul #(.KARATSUBA(KARATSUBA)) u_m2   (.a_i(s1_x1),   .b_i(s1_x1),   .p_o(m2));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m3   (.a_i(s2_x2),   .b_i(s2_x1),   .p_o(m3));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m4   (.a_i(s3_x2),   .b_i(s3_x2),   .p_o(m4));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m6   (.a_i(s3_x3),   .b_i(s3_x3),   .p_o(m6));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m8   (.a_i(s4_x4),   .b_i(s4_x4),   .p_o(m8));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m12  (.a_i(s4_x6),   .b_i(s4_x6),   .p_o(m12));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m16  (.a_i(s5_x8),   .b_i(s5_x8),   .p_o(m16));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m15  (.a_i(s5_x12),  .b_i(s5_x3),   .p_o(m15));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m32  (.a_i(s6_x16),  .b_i(s6_x16),  .p_o(m32));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m30  (.a_i(s6_x15),  .b_i(s6_x15),  .p_o(m30));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m64  (.a_i(s7_x32),  .b_i(s7_x32),  .p_o(m64));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m60  (.a_i(s7_x30),  .b_i(s7_x30),  .p_o(m60));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m124 (.a_i(s8_x64),  .b_i(s8_x60),  .p_o(m124));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m127 (.a_i(s9_x124), .b_i(s9_x3),   .p_o(m127));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m254 (.a_i(s10_x127),.b_i(s10_x127),.p_o(m254));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      s1_x1 <= '0;
      s2_x2 <= '0;   s2_x1 <= '0;
      s3_x2 <= '0;   s3_x3 <= '0;
      s4_x4 <= '0;   s4_x6 <= '0;   s4_x3 <= '0;
      s5_x8 <= '0;   s5_x12 <= '0;  s5_x3 <= '0;
      s6_x16 <= '0;  s6_x15 <= '0;  s6_x3 <= '0;
      s7_x32 <= '0;  s7_x30 <= '0;  s7_x3 <= '0;
      s8_x64 <= '0;  s8_x60 <= '0;  s8_x3 <= '0;
      s9_x124 <= '0; s9_x3 <= '0;
      s10_x127 <= '0;
      s11_x254 <= '0;
    end else if (en_i) begin
      vld_q <= {vld_q[STAGES-2:0], valid_i};
      s1_x1 <= data_i;
      s2_x2 <= m2;     s2_x1 <= s1_x1;
      s3_x2 <= s2_x2;  s3_x3 <= m3;
      s4_x4 <= m4;     s4_x6 <= m6;     s4_x3 <= s3_x3;
      s5_x8 <= m8;     s5_x12 <= m12;   s5_x3 <= s4_x3;
      s6_x16 <= m16;   s6_x15 <= m15;   s6_x3 <= s5_x3;
      s7_x32 <= m32;   s7_x30 <= m30;   s7_x3 <= s6_x3;
      s8_x64 <= m64;   s8_x60 <= m60;   s8_x3 <= s7_x3;
      s9_x124 <= m124; s9_x3 <= s8_x3;
      s10_x127 <= m127;
      s11_x254 <= m254;
    end
  end

  sbox_affine u_aff (.y_i(s11_x254), .res_o(data_o));
  assign valid_o = vld_q[STAGES-1];

endmodule
