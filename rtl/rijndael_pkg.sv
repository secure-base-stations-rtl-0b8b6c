// Rijndael arithmetic shared by the encryption, decryption and key-expansion
// logic of the encrypted memory system.
//
// The S-box and its inverse are not pasted in as tables: they are computed at
// elaboration from their definition (multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1, followed by the affine map with constant 0x63). The inverse
// is found through exponent/logarithm tables of the generator 0x03.
//
// Byte order follows the usual Rijndael convention: byte k of a block sits at
// bits [8*(4*NB-1-k) +: 8] (the first byte is the most significant), and byte k
// belongs to column k/4, row k%4. The block width NB (in 32-bit columns) is a
// parameter everywhere, so the same code runs AES-sized blocks (NB=4) and the
// 288-bit blocks (NB=9) that hold 256 data bits and a 32-bit address.
// Rijndael defines row shifts only up to NB=8; for NB=9 the NB=8 offsets
// (1, 3, 4) are used, a choice of this design.
package rijndael_pkg;

  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // GF(2^8) product by shift-and-add.
  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  // Forward S-box, packed: entry x at bits [8*x +: 8].
  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] exp_t, log_t, tbl;
    logic [7:0] p, inv, s;
    exp_t = '0;
    log_t = '0;
    p = 8'h01;
    for (int i = 0; i < 255; i++) begin
      exp_t[8*i +: 8] = p;
      log_t[8*p +: 8] = 8'(i);
      p = p ^ xtime(p);            // multiply by 0x03
    end
    for (int x = 0; x < 256; x++) begin
      if (x == 0) inv = 8'h00;
      else inv = exp_t[8*((255 - int'(log_t[8*x +: 8])) % 255) +: 8];
      s = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
      tbl[8*x +: 8] = s;
    end
    return tbl;
  endfunction

  localparam logic [2047:0] SBOX = gen_sbox();

  function automatic logic [2047:0] gen_inv_sbox();
    logic [2047:0] tbl;
    tbl = '0;
    for (int x = 0; x < 256; x++) tbl[8*int'(SBOX[8*x +: 8]) +: 8] = 8'(x);
    return tbl;
  endfunction

  localparam logic [2047:0] INV_SBOX = gen_inv_sbox();

  function automatic logic [7:0] sbox(input logic [7:0] x);
    return SBOX[8*x +: 8];
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] x);
    return INV_SBOX[8*x +: 8];
  endfunction

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  // Round constants x^(j-1) for key-expansion steps j = 1..31, packed with
  // step j at bits [8*j +: 8].
  function automatic logic [255:0] gen_rcon();
    logic [255:0] t;
    logic [7:0] r;
    t = '0;
    r = 8'h01;
    for (int j = 1; j < 32; j++) begin
      t[8*j +: 8] = r;
      r = xtime(r);
    end
    return t;
  endfunction

  localparam logic [255:0] RCON = gen_rcon();

  function automatic logic [7:0] rcon(input logic [4:0] j);
    return RCON[8*j +: 8];
  endfunction

  // Row-shift offset of row r for a block of nb columns.
  function automatic int shift_of(input int nb, input int r);
    if (r == 0) return 0;
    if (nb <= 6) return r;
    if (nb == 7) return (r == 3) ? 4 : r;
    return (r == 1) ? 1 : (r == 2) ? 3 : 4;
  endfunction

  function automatic int num_rounds(input int nb, input int nk);
    return ((nb > nk) ? nb : nk) + 6;
  endfunction

  function automatic logic [31:0] mix_column(input logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {gmul(a0, 8'h02) ^ gmul(a1, 8'h03) ^ a2 ^ a3,
            a0 ^ gmul(a1, 8'h02) ^ gmul(a2, 8'h03) ^ a3,
            a0 ^ a1 ^ gmul(a2, 8'h02) ^ gmul(a3, 8'h03),
            gmul(a0, 8'h03) ^ a1 ^ a2 ^ gmul(a3, 8'h02)};
  endfunction

  function automatic logic [31:0] inv_mix_column(input logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09),
            gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d),
            gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b),
            gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e)};
  endfunction

endpackage
