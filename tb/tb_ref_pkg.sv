// Reference models for the testbenches, written independently of the RTL:
// a byte-array Rijndael with any block width (S-box found by brute-force
// search for the multiplicative inverse), its key expansion, and a plain
// (39,32) SEC-DED encoder built from the codeword definition.
package tb_ref_pkg;

  typedef logic [7:0] bytes_t [];

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] sb(input logic [7:0] x);
    logic [7:0] inv, r;
    inv = 0;
    for (int y = 1; y < 256; y++) if (mul(x, 8'(y)) == 8'h01) inv = 8'(y);
    r = 8'h63;
    for (int i = 0; i < 8; i++)
      r[i] ^= inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return r;
  endfunction

  logic [7:0] SB [256];
  logic [7:0] ISB [256];
  bit         tables_built = 0;

  function automatic void build();
    if (tables_built) return;
    for (int x = 0; x < 256; x++) begin
      SB[x] = sb(8'(x));
      ISB[SB[x]] = 8'(x);
    end
    tables_built = 1;
  endfunction

  function automatic int rounds(input int nb, input int nk);
    return ((nb > nk) ? nb : nk) + 6;
  endfunction

  function automatic int shift(input int nb, input int r);
    int t4[4] = '{0, 1, 2, 3};
    int t7[4] = '{0, 1, 2, 4};
    int t8[4] = '{0, 1, 3, 4};
    if (nb <= 6) return t4[r];
    if (nb == 7) return t7[r];
    return t8[r];
  endfunction

  // Key schedule as 32-bit words, w[0] = first four key bytes.
  function automatic void expand(input int nb, input int nk, input logic [255:0] key,
                                 output logic [31:0] w [200]);
    logic [31:0] t;
    logic [7:0]  rc;
    int n;
    build();
    n = nb * (rounds(nb, nk) + 1);
    rc = 8'h01;
    for (int i = 0; i < nk; i++) w[i] = key[32*(nk-1-i) +: 32];
    for (int i = nk; i < n; i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {SB[t[31:24]], SB[t[23:16]], SB[t[15:8]], SB[t[7:0]]};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        t = {SB[t[31:24]], SB[t[23:16]], SB[t[15:8]], SB[t[7:0]]};
      end
      w[i] = w[i-nk] ^ t;
    end
  endfunction

  // Round key r of a schedule as a vector, first column most significant.
  function automatic logic [287:0] round_key(input int nb, input logic [31:0] w [200], input int r);
    logic [287:0] v;
    v = '0;
    for (int c = 0; c < nb; c++) v[32*(nb-1-c) +: 32] = w[r*nb + c];
    return v;
  endfunction

  function automatic logic [287:0] encrypt(input int nb, input int nk, input logic [255:0] key,
                                           input logic [287:0] pt);
    logic [31:0] w [200];
    logic [7:0] s [36], t [36];
    int nr;
    logic [287:0] out;
    expand(nb, nk, key, w);
    nr = rounds(nb, nk);
    for (int k = 0; k < 4*nb; k++) s[k] = pt[8*(4*nb-1-k) +: 8] ^ w[k/4][8*(3-k%4) +: 8];
    for (int r = 1; r <= nr; r++) begin
      for (int k = 0; k < 4*nb; k++) s[k] = SB[s[k]];
      for (int c = 0; c < nb; c++) for (int i = 0; i < 4; i++) t[4*c+i] = s[4*((c + shift(nb, i)) % nb) + i];
      for (int c = 0; c < nb; c++) begin
        if (r != nr) begin
          s[4*c+0] = mul(t[4*c],8'h02) ^ mul(t[4*c+1],8'h03) ^ t[4*c+2] ^ t[4*c+3];
          s[4*c+1] = t[4*c] ^ mul(t[4*c+1],8'h02) ^ mul(t[4*c+2],8'h03) ^ t[4*c+3];
          s[4*c+2] = t[4*c] ^ t[4*c+1] ^ mul(t[4*c+2],8'h02) ^ mul(t[4*c+3],8'h03);
          s[4*c+3] = mul(t[4*c],8'h03) ^ t[4*c+1] ^ t[4*c+2] ^ mul(t[4*c+3],8'h02);
        end else for (int i = 0; i < 4; i++) s[4*c+i] = t[4*c+i];
        for (int i = 0; i < 4; i++) s[4*c+i] ^= w[r*nb + c][8*(3-i) +: 8];
      end
    end
    out = '0;
    for (int k = 0; k < 4*nb; k++) out[8*(4*nb-1-k) +: 8] = s[k];
    return out;
  endfunction

  // (39,32) SEC-DED word {0, check[6:0], data}: Hamming positions 1..38,
  // check bit i at position 2^i, overall parity as check bit 6.
  function automatic logic [39:0] ecc_word(input logic [31:0] d);
    logic [38:1] cw;
    logic [6:0] ck;
    int j;
    cw = '0;
    j = 0;
    for (int p = 1; p <= 38; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16 && p != 32) begin
        cw[p] = d[j];
        j++;
      end
    ck = '0;
    for (int p = 1; p <= 38; p++)
      for (int i = 0; i < 6; i++) if ((p >> i) & 1) ck[i] ^= cw[p];
    for (int i = 0; i < 6; i++) cw[1 << i] = ck[i];
    ck[6] = ^cw;
    return {1'b0, ck, d};
  endfunction

  function automatic logic [255:0] rand256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

endpackage
