// tb_aes_ref_pkg: reference arithmetic for the S-Box testbenches, written
// independently of the design: multiplication by repeated doubling
// ("xtime"), the inverse found by searching for the y with x*y = 1, and the
// affine transform in its bit-matrix form
//   b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i,  c = 0x63.
package tb_aes_ref_pkg;

  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = xtime(a);
    end
    return r;
  endfunction

  function automatic logic [7:0] inv(logic [7:0] x);
    for (int y = 1; y < 256; y++) if (mul(x, 8'(y)) == 8'h01) return 8'(y);
    return 8'h00;
  endfunction

  function automatic logic [7:0] affine(logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ 8'h63 >> i;
    return r;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    return affine(inv(x));
  endfunction

endpackage
