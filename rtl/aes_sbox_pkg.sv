// aes_sbox_pkg: types, constants and reference functions for the AES S-Box
// implementations.
//
// The AES S-Box maps a byte x to A(x^-1) in GF(2^8) with the reduction
// polynomial x^8 + x^4 + x^3 + x + 1 (0x11B), where 0 maps to 0 before the
// affine step A(y) = y ^ rotl(y,1) ^ rotl(y,2) ^ rotl(y,3) ^ rotl(y,4) ^ 0x63.
// By Fermat's little theorem the inverse is x^254. The functions here are
// used at elaboration to fill the lookup-table ROMs (gen_sbox_table), and
// the package holds the latency of each architecture; the hardware datapaths
// of the Fermat versions use the multiplier modules, not these functions.
package aes_sbox_pkg;

  typedef logic [7:0] byte_t;
  typedef byte_t sbox_table_t [256];

  localparam logic [8:0] GF_POLY    = 9'h11B;
  localparam byte_t      AFFINE_C   = 8'h63;

  // The five S-Box architectures that are compared.
  typedef enum logic [2:0] {
    ARCH_LUT_V1 = 3'd0,   // single-cycle lookup table
    ARCH_LUT_V2 = 3'd1,   // 2-stage pipelined lookup table
    ARCH_FLT_V1 = 3'd2,   // single-cycle Fermat inverse
    ARCH_FLT_V2 = 3'd3,   // 12-stage pipelined Fermat inverse
    ARCH_FLT_V3 = 3'd4    // 11-stage pipeline-parallel Fermat inverse
  } sbox_arch_e;

  localparam int unsigned NUM_ARCH = 5;

  // Clock edges from a byte accepted to its result on the output.
  function automatic int unsigned sbox_latency(sbox_arch_e arch);
    unique case (arch)
      ARCH_LUT_V1: return 1;
      ARCH_LUT_V2: return 2;
      ARCH_FLT_V1: return 1;
      ARCH_FLT_V2: return 12;
      default:     return 11;
    endcase
  endfunction

  // x * 3 in GF(2^8): 3 = x + 1 generates the multiplicative group.
  function automatic byte_t gf_mul3(byte_t a);
    return a ^ {a[6:0], 1'b0} ^ (a[7] ? GF_POLY[7:0] : 8'h00);
  endfunction

  function automatic byte_t affine_ref(byte_t y);
    byte_t r;
    r = AFFINE_C;
    for (int s = 0; s < 5; s++) r ^= byte_t'((y << s) | (y >> (8 - s)));
    return r;
  endfunction

  // Table of S(x) for all 256 bytes. The inverse comes from power tables of
  // the generator 3: with x = 3^k, x^-1 = 3^(255-k). This needs only a few
  // hundred steps at elaboration.
  function automatic sbox_table_t gen_sbox_table();
    sbox_table_t t;
    byte_t       pw [256];
    int unsigned lg [256];
    pw[0] = 8'h01;
    for (int k = 1; k < 256; k++) pw[k] = gf_mul3(pw[k-1]);
    for (int k = 0; k < 256; k++) lg[k] = 0;
    for (int k = 0; k < 255; k++) lg[pw[k]] = k;
    t[0] = affine_ref(8'h00);
    for (int i = 1; i < 256; i++) t[i] = affine_ref(pw[(255 - lg[i]) % 255]);
    return t;
  endfunction

endpackage
