// aes_ref_pkg: plain standard-basis AES-128 reference model for the testbenches.
//
// Everything here is computed the textbook way, independently of the tower-field
// datapath: GF(2^8) products by shift-and-reduce with x^8+x^4+x^3+x+1, inverses
// as x^254, the S-box as inverse followed by the affine map written bitwise
// (b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ 0x63), MixColumns from its
// matrix, and the standard key expansion. The only values shared with the
// design are the printed basis-change matrices X and X^-1 (aes_tower_pkg),
// applied here with a separate matrix-vector routine, so that expected values
// can be expressed in a tower basis.
package aes_ref_pkg;
  import aes_tower_pkg::X127, aes_tower_pkg::XI127, aes_tower_pkg::X94, aes_tower_pkg::XI94;

  typedef logic [7:0]   u8;
  typedef logic [127:0] blk;

  function automatic u8 gmul(u8 a, u8 b);
    u8 r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return r;
  endfunction

  function automatic u8 ginv(u8 a);
    u8 r = 8'h01;
    for (int i = 0; i < 254; i++) r = gmul(r, a);
    return r;  // 0 -> 0
  endfunction

  // Affine part of the S-box, bitwise.
  function automatic u8 affine(u8 b);
    u8 y;
    for (int i = 0; i < 8; i++)
      y[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  // Tables filled by init(); every testbench calls init() first.
  u8 SB [256];
  u8 ISB [256];
  u8 IAFF [256];

  function automatic void init();
    for (int x = 0; x < 256; x++) begin
      SB[x] = affine(ginv(u8'(x)));
      ISB[SB[x]] = u8'(x);
      IAFF[affine(u8'(x))] = u8'(x);
    end
  endfunction

  function automatic u8 sbox(u8 x);       return SB[x];   endfunction
  function automatic u8 inv_sbox(u8 y);   return ISB[y];  endfunction
  function automatic u8 affine_inv(u8 y); return IAFF[y]; endfunction

  // Matrix given as 8 rows, first row = output bit 7, row bit 7 = input bit 7.
  function automatic u8 mvec(logic [7:0][7:0] m, u8 x);
    u8 y;
    for (int i = 0; i < 8; i++) begin
      y[i] = 1'b0;
      for (int j = 0; j < 8; j++) y[i] ^= m[i][j] & x[j];
    end
    return y;
  endfunction

  function automatic blk mblk(logic [7:0][7:0] m, blk s);
    blk o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = mvec(m, s[127-8*i -: 8]);
    return o;
  endfunction

  function automatic u8 bget(blk s, int i); return s[127-8*i -: 8]; endfunction

  function automatic blk sub_bytes(blk s);
    blk o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = sbox(bget(s, i));
    return o;
  endfunction

  function automatic blk inv_blk(blk s);
    blk o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = ginv(bget(s, i));
    return o;
  endfunction

  function automatic blk affine_inv_blk(blk s);
    blk o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = affine_inv(bget(s, i));
    return o;
  endfunction

  function automatic blk inv_sub_bytes(blk s);
    blk o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = inv_sbox(bget(s, i));
    return o;
  endfunction

  // Row r of column c is byte 4c+r; ShiftRows moves row r left by r.
  function automatic blk shift_rows(blk s);
    blk o;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++)
      o[127-8*(4*c+r) -: 8] = bget(s, 4*((c+r)%4)+r);
    return o;
  endfunction

  function automatic blk inv_shift_rows(blk s);
    blk o;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++)
      o[127-8*(4*c+r) -: 8] = bget(s, 4*((c+4-r)%4)+r);
    return o;
  endfunction

  function automatic blk mix_gen(blk s, u8 k0, u8 k1, u8 k2, u8 k3);
    blk o;
    u8 k[4] = '{k0, k1, k2, k3};
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) begin
      u8 acc = 0;
      for (int j = 0; j < 4; j++) acc ^= gmul(k[(j - r + 4) % 4], bget(s, 4*c+j));
      o[127-8*(4*c+r) -: 8] = acc;
    end
    return o;
  endfunction

  function automatic blk mix_columns(blk s);     return mix_gen(s, 8'h02, 8'h03, 8'h01, 8'h01); endfunction
  function automatic blk inv_mix_columns(blk s); return mix_gen(s, 8'h0e, 8'h0b, 8'h0d, 8'h09); endfunction

  typedef blk rk_t [11];

  function automatic rk_t expand(blk key);
    rk_t rk;
    logic [31:0] w [44];
    u8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic blk encrypt(blk key, blk pt);
    rk_t rk = expand(key);
    blk s = pt ^ rk[0];
    for (int r = 1; r < 10; r++) s = mix_columns(shift_rows(sub_bytes(s))) ^ rk[r];
    return shift_rows(sub_bytes(s)) ^ rk[10];
  endfunction

  function automatic blk decrypt(blk key, blk ct);
    rk_t rk = expand(key);
    blk s = ct ^ rk[10];
    for (int r = 9; r >= 1; r--) s = inv_mix_columns(inv_sub_bytes(inv_shift_rows(s)) ^ rk[r]);
    return inv_sub_bytes(inv_shift_rows(s)) ^ rk[0];
  endfunction

  function automatic blk rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction
endpackage
