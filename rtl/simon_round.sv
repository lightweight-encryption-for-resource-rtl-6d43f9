// simon_round: one SIMON round on a 16-bit word pair, purely combinational.
//
// Implements f(XL, XR, K) = (S^1 XL & S^8 XL) ^ S^2 XL ^ XR ^ K, where S^j is
// a left rotation by j, and the Feistel swap: the new left word is f, the new
// right word is the old left word. Three rotations (wires only), one AND and
// three XORs per bit, as in the document's round diagram.
//
// Interface: xl_i, xr_i, k_i in; xl_o, xr_o out. No clock; the surrounding
// register bank captures the result once per clock in ENCRYPT mode.
module simon_round
  import simon_pkg::*;
(
  input  word_t xl_i,
  input  word_t xr_i,
  input  word_t k_i,
  output word_t xl_o,
  output word_t xr_o
);

  always_comb begin
    xl_o = (rotl(xl_i, 1) & rotl(xl_i, 8)) ^ rotl(xl_i, 2) ^ xr_i ^ k_i;
    xr_o = xl_i;
  end

endmodule
