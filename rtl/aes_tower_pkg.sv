// aes_tower_pkg: types, bit matrices and Galois-field arithmetic shared by the
// tower-field AES datapath.
//
// A byte is handled in one of two representations: the standard AES polynomial
// basis, or a tower-field basis GF(2^8)/GF(2^4)/GF(2^2) built from normal bases
// with unit trace at every level. Bit 7..0 of a tower byte are the coefficients
// of Y^16Z^4W^2, Y^16Z^4W, Y^16ZW^2, Y^16ZW, YZ^4W^2, YZ^4W, YZW^2, YZW, so the
// high nibble is the Y^16 coefficient and the low nibble the Y coefficient, and
// likewise inside each nibble.
//
// Two towers are used. Encryption works in basis #127 of the usual enumeration
// of 432 tower bases, decryption in basis #94; both basis-change matrices X
// (tower -> standard) and X^-1 are written out below as the source gives them.
// Every other matrix (affine transform combined with MixColumns scalings, the
// final basis changes) is derived from them at elaboration time by constant
// functions, so only the defining formulas appear here.
//
// Matrix convention (bmat_t): m[i] is the row that produces output bit i, and
// bit j of that row multiplies input bit j. Written as a concatenation
// {row for bit 7, ..., row for bit 0}, a matrix reads exactly like the printed
// 8x8 bit matrices with bit 7 first.
//
// Sub-field constants (this design's derivation from the X matrices): in
// basis #127 the GF(2^4)/GF(2^2) norm is N = W (2'b01) and the GF(2^8)/GF(2^4)
// norm is nu = 4'h7; in basis #94 N = W^2 (2'b10) and nu = 4'h2.
package aes_tower_pkg;

  typedef logic [7:0]        byte_t;
  typedef logic [7:0][7:0]   bmat_t;
  typedef logic [127:0]      block_t;
  typedef logic [3:0]        rnd_t;

  localparam int unsigned NR = 10;  // rounds of AES-128

  // ---------------------------------------------------------------- matrices
  localparam bmat_t IDENT = {8'b10000000, 8'b01000000, 8'b00100000, 8'b00010000,
                             8'b00001000, 8'b00000100, 8'b00000010, 8'b00000001};

  // S-box affine matrix M and constant b (standard basis).
  localparam bmat_t AFF_M = {8'b11111000, 8'b01111100, 8'b00111110, 8'b00011111,
                             8'b10001111, 8'b11000111, 8'b11100011, 8'b11110001};
  localparam byte_t AFF_B = 8'h63;

  // Multiplication by the field element 2 (standard basis).
  localparam bmat_t T2 = {8'b01000000, 8'b00100000, 8'b00010000, 8'b10001000,
                          8'b10000100, 8'b00000010, 8'b10000001, 8'b10000000};

  // Basis #127 (encryption): X converts tower -> standard.
  localparam bmat_t X127  = {8'b00100100, 8'b01100011, 8'b11011011, 8'b01010110,
                             8'b00101110, 8'b10110111, 8'b11011101, 8'b11000010};
  localparam bmat_t XI127 = {8'b00101101, 8'b01010101, 8'b11011011, 8'b01100111,
                             8'b11110001, 8'b01011011, 8'b01111001, 8'b10110111};
  // Basis #94 (decryption).
  localparam bmat_t X94   = {8'b01110100, 8'b01110010, 8'b10001011, 8'b10111101,
                             8'b11110110, 8'b00111010, 8'b00100010, 8'b00100110};
  localparam bmat_t XI94  = {8'b01001011, 8'b01110011, 8'b11000001, 8'b00110001,
                             8'b00110111, 8'b00000011, 8'b11000011, 8'b10011111};

  localparam logic [1:0] N127  = 2'b01;
  localparam logic [3:0] NU127 = 4'h7;
  localparam logic [1:0] N94   = 2'b10;
  localparam logic [3:0] NU94  = 4'h2;

  // ------------------------------------------------------- matrix functions
  function automatic byte_t mat_apply(bmat_t m, byte_t x);
    byte_t y;
    for (int i = 0; i < 8; i++) y[i] = ^(m[i] & x);
    return y;
  endfunction

  function automatic bmat_t mat_mul(bmat_t a, bmat_t b);
    bmat_t p;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        logic s;
        s = 1'b0;
        for (int k = 0; k < 8; k++) s ^= a[i][k] & b[k][j];
        p[i][j] = s;
      end
    return p;
  endfunction

  function automatic bmat_t mat_add(bmat_t a, bmat_t b);
    return a ^ b;
  endfunction

  // Inverse of an invertible matrix: column j is the unique x with m*x = e_j.
  function automatic bmat_t mat_inv(bmat_t m);
    bmat_t r;
    r = '0;
    for (int j = 0; j < 8; j++)
      for (int x = 0; x < 256; x++)
        if (mat_apply(m, byte_t'(x)) == byte_t'(1 << j))
          for (int i = 0; i < 8; i++) r[i][j] = x[i];
    return r;
  endfunction

  // Scaling matrices of the standard basis.
  localparam bmat_t T3 = T2 ^ IDENT;
  localparam bmat_t T4 = mat_mul(T2, T2);
  localparam bmat_t T8 = mat_mul(T4, T2);
  localparam bmat_t TC = T8 ^ T4;
  localparam bmat_t TD = TC ^ IDENT;
  localparam bmat_t T9 = T8 ^ IDENT;
  localparam bmat_t AFF_MI = mat_inv(AFF_M);

  // X^-1 * A * X : a standard-basis linear map expressed in a tower basis.
  function automatic bmat_t similar(bmat_t xi, bmat_t a, bmat_t x);
    return mat_mul(xi, mat_mul(a, x));
  endfunction

  // Encryption (basis #127).
  localparam bmat_t ENC_IN  = XI127;                                   // standard -> tower
  localparam bmat_t ENC_A   = similar(XI127, AFF_M, X127);             // X^-1 M X
  localparam bmat_t ENC_A2  = similar(XI127, mat_mul(T2, AFF_M), X127);// X^-1 T2 M X
  localparam bmat_t ENC_A3  = similar(XI127, mat_mul(T3, AFF_M), X127);// X^-1 T3 M X
  localparam byte_t ENC_C   = mat_apply(XI127, AFF_B);                 // c = X^-1 b
  localparam bmat_t ENC_OUT = mat_mul(AFF_M, X127);                    // M X (plus b)

  // Decryption (basis #94).
  localparam bmat_t DEC_IN  = mat_mul(XI94, AFF_MI);                   // X^-1 M^-1
  localparam byte_t DEC_D   = mat_apply(DEC_IN, AFF_B);                // d = X^-1 M^-1 b
  localparam bmat_t DEC_B2  = similar(XI94, mat_mul(AFF_MI, T2), X94); // X^-1 M^-1 T2 X
  localparam bmat_t DEC_B3  = similar(XI94, mat_mul(AFF_MI, T3), X94);
  localparam bmat_t DEC_BD  = similar(XI94, mat_mul(AFF_MI, TD), X94);
  localparam bmat_t DEC_B9  = similar(XI94, mat_mul(AFF_MI, T9), X94);
  localparam bmat_t DEC_OUT = X94;                                     // tower -> standard

  // -------------------------------------------- tower-field arithmetic
  // GF(2^2), normal basis [W^2, W]: g = {g1, g0}.
  function automatic logic [1:0] gf4_mul(logic [1:0] a, logic [1:0] b);
    logic e;
    e = (a[1] ^ a[0]) & (b[1] ^ b[0]);
    return {(a[1] & b[1]) ^ e, (a[0] & b[0]) ^ e};
  endfunction

  // In GF(2^2) the inverse and the square are both a swap of the two bits.
  function automatic logic [1:0] gf4_sq(logic [1:0] a);
    return {a[0], a[1]};
  endfunction

  // GF(2^4), normal basis [Z^4, Z] over GF(2^2), with norm n = Z^5.
  function automatic logic [3:0] gf16_mul(logic [3:0] a, logic [3:0] b, logic [1:0] n);
    logic [1:0] e;
    e = gf4_mul(gf4_mul(a[3:2] ^ a[1:0], b[3:2] ^ b[1:0]), n);
    return {gf4_mul(a[3:2], b[3:2]) ^ e, gf4_mul(a[1:0], b[1:0]) ^ e};
  endfunction


  // ------------------------------------------------------ byte helpers
  // Byte i of a block (i = 4*column + row); byte 0 is the most significant.
  function automatic byte_t get_byte(block_t s, int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = s[127 - 8*(4*((c + r) % 4) + r) -: 8];
    return o;
  endfunction

  function automatic block_t inv_shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*((c + r) % 4) + r) -: 8] = s[127 - 8*(4*c + r) -: 8];
    return o;
  endfunction

  function automatic block_t mat_apply_block(bmat_t m, block_t s);
    block_t o;
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = mat_apply(m, s[127 - 8*i -: 8]);
    return o;
  endfunction

endpackage
