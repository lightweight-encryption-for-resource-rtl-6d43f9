// simon_pkg: constants and types shared by the SIMON 32/64 core.
//
// SIMON 32/64 works on a 32-bit block split into two 16-bit words (XL, XR)
// and a 64-bit key held as four 16-bit words. The round constant is
// C xor z_j[i]: C = 2^16 - 4 and z_0 is the 62-bit sequence of the SIMON
// specification for the m = 4, 32-bit block variant. Bit i of Z0 below is
// z_0[i], the constant mixed into the key word produced in round i. The word
// size, key size, round count and the 128-cycle operating schedule follow the
// document; the numeric values of C and z_0 come from the SIMON
// specification, which the document cites but does not print.
package simon_pkg;

  localparam int unsigned WORD_W   = 16;  // n
  localparam int unsigned KEY_WORDS = 4;  // m
  localparam int unsigned BLOCK_W  = 2 * WORD_W;
  localparam int unsigned KEY_W    = KEY_WORDS * WORD_W;

  typedef logic [WORD_W-1:0] word_t;

  localparam word_t      SIMON_C  = 16'hFFFC;
  localparam logic [61:0] SIMON_Z0 = 62'h19C3522FB386A45F;

  // Mode of the interlaced multiplexers in front of a register bank.
  typedef enum logic [1:0] {
    MODE_FIFO    = 2'd0,  // serial shift, one bit per clock
    MODE_IDLE    = 2'd1,  // hold
    MODE_ENCRYPT = 2'd2   // parallel load of the round / key-schedule result
  } mux_mode_e;

  // Operating region, brought out as the debug state.
  typedef enum logic [1:0] {
    ST_LOAD_PT  = 2'd0,   // plaintext and key shift in
    ST_LOAD_KEY = 2'd1,   // plaintext held, rest of the key shifts in
    ST_ENCRYPT  = 2'd2,   // one round per clock
    ST_SHIFT_CT = 2'd3    // ciphertext shifts out
  } simon_state_e;

  function automatic word_t rotl(word_t x, int unsigned s);
    return word_t'((x << s) | (x >> (WORD_W - s)));
  endfunction

  function automatic word_t rotr(word_t x, int unsigned s);
    return word_t'((x >> s) | (x << (WORD_W - s)));
  endfunction

endpackage
