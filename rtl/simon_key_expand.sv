// simon_key_expand: SIMON key expansion for m = 4 key words, combinational.
//
// From the current window (K_i, K_i+1, K_i+3) it forms
//   T       = S^-3 K_i+3 ^ K_i+1
//   K_i+4   = K_i ^ T ^ S^-1 T ^ C ^ z_i
// with S^-j a right rotation, C = 0xFFFC and z_i one bit of the z_0
// sequence, which the controller selects by round index. Two rotations
// (wires) and five XOR levels per bit, as in the document's key-expansion
// diagram. K_i+2 is not used by the equation and is not an input.
//
// Interface: k0_i = K_i, k1_i = K_i+1, k3_i = K_i+3, z_i = z_0[i];
// k4_o = K_i+4. No clock.
module simon_key_expand
  import simon_pkg::*;
(
  input  word_t k0_i,
  input  word_t k1_i,
  input  word_t k3_i,
  input  logic  z_i,
  output word_t k4_o
);

  word_t t;

  always_comb begin
    t    = rotr(k3_i, 3) ^ k1_i;
    k4_o = k0_i ^ t ^ rotr(t, 1) ^ SIMON_C ^ word_t'(z_i);
  end

endmodule
