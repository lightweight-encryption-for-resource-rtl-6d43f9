// sbox_lut_v2: two-stage pipelined lookup-table AES S-Box (LUT V2).
//
// The 256-to-1 byte selection is split at a register, following the
// document's pipelined multiplexer diagram:
//   clock 1: the low nibble of the input selects, in each of the 16 rows of
//            the table, one byte (sixteen 16-1 multiplexers); the 16 chosen
//            bytes and the high nibble are registered;
//   clock 2: the registered high nibble picks one of the 16 bytes (two 4-1
//            levels) and the result is registered.
// Latency 2, one byte per clock. en_i low freezes both stages. The figure
// shows the middle register as one byte wide; here it holds all sixteen
// candidates, since the second stage needs them. Table contents as in
// sbox_lut_v1. Reset (active low, asynchronous) clears the valid bits and
// data registers.
module sbox_lut_v2
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

  byte_t      row_sel [16];
  byte_t      cand_q  [16];
  logic [3:0] hi_q;
  logic       valid_q;

  always_comb begin
    for (int h = 0; h < 16; h++) row_sel[h] = ROM[{h[3:0], data_i[3:0]}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int h = 0; h < 16; h++) cand_q[h] <= '0;
      hi_q    <= '0;
      valid_q <= 1'b0;
      valid_o <= 1'b0;
      data_o  <= '0;
    end else if (en_i) begin
      for (int h = 0; h < 16; h++) cand_q[h] <= row_sel[h];
      hi_q    <= data_i[7:4];
      valid_q <= valid_i;
      valid_o <= valid_q;
      data_o  <= cand_q[hi_q];
    end
  end

endmodule
