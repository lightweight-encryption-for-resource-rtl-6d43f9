// sbox_flt_v2: 12-stage pipelined Fermat-inverse AES S-Box (FLT V2).
//
// The single-cycle exponent chain of sbox_flt_v1 is cut into twelve register
// stages, one multiplier per stage. Powers still needed later (x, x3, x6)
// travel along in delay registers. What each stage register holds follows
// the document's 12-stage pipeline diagram:
//   s1: x          s2: x2, x        s3: x3, x       s4: x6, x3, x
//   s5: x12, x6, x3, x               s6: x15, x6, x  s7: x30, x6, x
//   s8: x60, x6, x s9: x120, x6, x   s10: x126, x    s11: x127
//   s12: x254
// The affine transform is applied combinationally to the stage-12 register,
// so a byte accepted at one rising edge (valid_i, en_i) is on data_o with
// valid_o after the 12th edge counted from that one: latency 12, one byte per
// clock. en_i low freezes every stage. Reset (active low, asynchronous)
// clears the valid pipeline and the data registers.
module sbox_flt_v2
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

  localparam int unsigned STAGES = 12;

  // Stage registers, named by stage and power.
  byte_t s1_x1;
  byte_t s2_x2, s2_x1;
  byte_t s3_x3, s3_x1;
  byte_t s4_x6, s4_x3, s4_x1;
  byte_t s5_x12, s5_x6, s5_x3, s5_x1;
  byte_t s6_x15, s6_x6, s6_x1;
  byte_t s7_x30, s7_x6, s7_x1;
  byte_t s8_x60, s8_x6, s8_x1;
  byte_t s9_x120, s9_x6, s9_x1;
  byte_t s10_x126, s10_x1;
  byte_t s11_x127;
  byte_t s12_x254;
  logic [STAGES-1:0] vld_q;

  // One multiplier per stage boundary.
  byte_t m2, m3, m6, m12, m15, m30, m60, m120, m126, m127, m254;

  gf_mul #(.KARATSUBA(KARATSUBA)) u_m2   (.a_i(s1_x1),   .b_i(s1_x1),   .p_o(m2));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m3   (.a_i(s2_x2),   .b_i(s2_x1),   .p_o(m3));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m6   (.a_i(s3_x3),   .b_i(s3_x3),   .p_o(m6));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m12  (.a_i(s4_x6),   .b_i(s4_x6),   .p_o(m12));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m15  (.a_i(s5_x12),  .b_i(s5_x3),   .p_o(m15));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m30  (.a_i(s6_x15),  .b_i(s6_x15),  .p_o(m30));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m60  (.a_i(s7_x30),  .b_i(s7_x30),  .p_o(m60));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m120 (.a_i(s8_x60),  .b_i(s8_x60),  .p_o(m120));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m126 (.a_i(s9_x120), .b_i(s9_x6),   .p_o(m126));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m127 (.a_i(s10_x126),.b_i(s10_x1),  .p_o(m127));
  gf_mul #(.KARATSUBA(KARATSUBA)) u_m254 (.a_i(s11_x127),.b_i(s11_x127),.p_o(m254));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      s1_x1 <= '0;
      s2_x2 <= '0;    s2_x1 <= '0;
      s3_x3 <= '0;    s3_x1 <= '0;
      s4_x6 <= '0;    s4_x3 <= '0;  s4_x1 <= '0;
      s5_x12 <= '0;   s5_x6 <= '0;  s5_x3 <= '0;  s5_x1 <= '0;
      s6_x15 <= '0;   s6_x6 <= '0;  s6_x1 <= '0;
      s7_x30 <= '0;   s7_x6 <= '0;  s7_x1 <= '0;
      s8_x60 <= '0;   s8_x6 <= '0;  s8_x1 <= '0;
      s9_x120 <= '0;  s9_x6 <= '0;  s9_x1 <= '0;
      s10_x126 <= '0; s10_x1 <= '0;
      s11_x127 <= '0;
      s12_x254 <= '0;
    end else if (en_i) begin
      vld_q <= {vld_q[STAGES-2:0], valid_i};
      s1_x1 <= data_i;
      s2_x2 <= m2;       s2_x1 <= s1_x1;
      s3_x3 <= m3;       s3_x1 <= s2_x1;
      s4_x6 <= m6;       s4_x3 <= s3_x3;  s4_x1 <= s3_x1;
      s5_x12 <= m12;     s5_x6 <= s4_x6;  s5_x3 <= s4_x3;  s5_x1 <= s4_x1;
      s6_x15 <= m15;     s6_x6 <= s5_x6;  s6_x1 <= s5_x1;
      s7_x30 <= m30;     s7_x6 <= s6_x6;  s7_x1 <= s6_x1;
      s8_x60 <= m60;     s8_x6 <= s7_x6;  s8_x1 <= s7_x1;
      s9_x120 <= m120;   s9_x6 <= s8_x6;  s9_x1 <= s8_x1;
      s10_x126 <= m126;  s10_x1 <= s9_x1;
      s11_x127 <= m127;
      s12_x254 <= m254;
    end
  end

  sbox_affine u_aff (.y_i(s12_x254), .res_o(data_o));
  assign valid_o = vld_q[STAGES-1];

endmodule
