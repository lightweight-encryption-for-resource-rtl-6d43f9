// sbox_lut_v1: single-cycle lookup-table AES S-Box (LUT V1).
//
// A 256-entry byte ROM, read combinationally with the input byte as the
// address; the result is registered, so a byte presented with valid_i before
// a rising edge (with en_i high) appears on data_o, with valid_o, after that
// edge: latency 1, one byte per clock. en_i low freezes the output register
// (used for back-pressure by the stream wrapper). The ROM contents are
// computed at elaboration as A(x^254) (see aes_sbox_pkg), which is the
// standard AES table. Reset (active low, asynchronous) clears valid_o and the
// output byte.
module sbox_lut_v1
  import aes_sbox_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en_i,
  input  logic  valid_i,
  input  byte_t data_i,
  output logic  valid_o,
  output byte_t data_o
);

  localparam sbox_table_t ROM = gen_sbox_table();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      data_o  <= '0;
    end else if (en_i) begin
      valid_o <= valid_i;
      data_o  <= ROM[data_i];
    end
  end

endmodule
