// crisax_ref_pkg: reference models used by the testbenches.
//
// Each model is written independently of the RTL and, where possible, in a different
// form: Ascon works directly on the bit-interleaved words (rotations split into
// even/odd halves), TinyJAMBU and Grain are stepped one bit at a time, Keccak uses the
// printed rotation-offset and round-constant tables, GIFT and PHOTON look the S-box up
// per cell, and PHOTON uses a cell array with the precomputed MixColumn matrix.
package crisax_ref_pkg;

  typedef logic [31:0] w32;

  function automatic w32 ror(w32 x, int unsigned n);
    n = n % 32;
    if (n == 0) return x;
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic w32 rol(w32 x, int unsigned n);
    return ror(x, (32 - (n % 32)) % 32);
  endfunction

  // ------------------------------------------------------------------ Ascon (interleaved)
  typedef w32 asc_t [10];

  // 64-bit right rotation of the interleaved pair (e, o) by n.
  function automatic void bi_ror(input w32 e, input w32 o, input int unsigned n, output w32 re, output w32 ro);
    if (n % 2 == 0) begin
      re = ror(e, n / 2);
      ro = ror(o, n / 2);
    end else begin
      re = ror(o, (n - 1) / 2);
      ro = ror(e, (n + 1) / 2);
    end
  endfunction

  function automatic void ascon_sbox(ref asc_t s, input int unsigned r);
    logic [7:0] c;
    w32 x [5];
    w32 t [5];
    c = {4'hf - 4'(r), 4'(r)};
    for (int h = 0; h < 2; h++) begin
      for (int i = 0; i < 5; i++) x[i] = s[2*i + h];
      for (int k = 0; k < 4; k++) x[2][k] ^= c[2*k + h];
      x[0] ^= x[4]; x[4] ^= x[3]; x[2] ^= x[1];
      t[0] = x[0] ^ (~x[1] & x[2]);
      t[1] = x[1] ^ (~x[2] & x[3]);
      t[2] = x[2] ^ (~x[3] & x[4]);
      t[3] = x[3] ^ (~x[4] & x[0]);
      t[4] = x[4] ^ (~x[0] & x[1]);
      t[1] ^= t[0]; t[0] ^= t[4]; t[3] ^= t[2]; t[2] = ~t[2];
      for (int i = 0; i < 5; i++) s[2*i + h] = t[i];
    end
  endfunction

  function automatic void ascon_linear(ref asc_t s);
    int unsigned r1 [5] = '{19, 61, 1, 10, 7};
    int unsigned r2 [5] = '{28, 39, 6, 17, 41};
    w32 ae, ao, be, bo;
    for (int i = 0; i < 5; i++) begin
      bi_ror(s[2*i], s[2*i+1], r1[i], ae, ao);
      bi_ror(s[2*i], s[2*i+1], r2[i], be, bo);
      s[2*i]   = s[2*i]   ^ ae ^ be;
      s[2*i+1] = s[2*i+1] ^ ao ^ bo;
    end
  endfunction

  function automatic void ascon_perm(ref asc_t s, input int unsigned n);
    for (int unsigned r = 12 - n; r < 12; r++) begin
      ascon_sbox(s, r);
      ascon_linear(s);
    end
  endfunction

  // ------------------------------------------------------------------ Keccak-f[200]
  typedef logic [7:0] kl_t;
  typedef kl_t kec_t [5][5];   // [x][y]

  function automatic kl_t rol8(kl_t v, int unsigned n);
    n = n % 8;
    if (n == 0) return v;
    return (v << n) | (v >> (8 - n));
  endfunction

  function automatic kec_t kec_from(w32 w [7]);
    kec_t a;
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++) a[x][y] = w[(x + 5*y) / 4][8*((x + 5*y) % 4) +: 8];
    return a;
  endfunction

  function automatic void kec_to(input kec_t a, ref w32 w [7]);
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++) w[(x + 5*y) / 4][8*((x + 5*y) % 4) +: 8] = a[x][y];
  endfunction

  function automatic void kec_theta(ref kec_t a);
    kl_t c [5];
    kl_t d [5];
    for (int x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
    for (int x = 0; x < 5; x++) d[x] = c[(x + 4) % 5] ^ rol8(c[(x + 1) % 5], 1);
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] ^= d[x];
  endfunction

  // Rotation offsets of Keccak, indexed [x][y].
  function automatic void kec_rho(ref kec_t a);
    int unsigned off [5][5] = '{'{0, 36, 3, 41, 18}, '{1, 44, 10, 45, 2}, '{62, 6, 43, 15, 61},
                                '{28, 55, 25, 21, 56}, '{27, 20, 39, 8, 14}};
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] = rol8(a[x][y], off[x][y]);
  endfunction

  function automatic void kec_pi(ref kec_t a);
    kec_t b;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) b[y][(2*x + 3*y) % 5] = a[x][y];
    a = b;
  endfunction

  function automatic void kec_chi_iota(ref kec_t a, input int unsigned r);
    kl_t rc [18] = '{8'h01, 8'h82, 8'h8A, 8'h00, 8'h8B, 8'h01, 8'h81, 8'h09, 8'h8A,
                     8'h88, 8'h09, 8'h0A, 8'h8B, 8'h8B, 8'h89, 8'h03, 8'h02, 8'h80};
    kec_t b;
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        b[x][y] = a[x][y] ^ ((~a[(x + 1) % 5][y]) & a[(x + 2) % 5][y]);
    b[0][0] ^= rc[r];
    a = b;
  endfunction

  function automatic void kec_perm(ref kec_t a, input int unsigned n);
    for (int unsigned r = 18 - n; r < 18; r++) begin
      kec_theta(a); kec_rho(a); kec_pi(a); kec_chi_iota(a, r);
    end
  endfunction

  // ------------------------------------------------------------------ Xoodoo
  typedef w32 xoo_t [3][4];   // [plane][lane]

  function automatic void xoo_theta(ref xoo_t a);
    w32 p [4];
    w32 e [4];
    for (int x = 0; x < 4; x++) p[x] = a[0][x] ^ a[1][x] ^ a[2][x];
    for (int x = 0; x < 4; x++) e[x] = rol(p[(x + 3) % 4], 5) ^ rol(p[(x + 3) % 4], 14);
    for (int y = 0; y < 3; y++) for (int x = 0; x < 4; x++) a[y][x] ^= e[x];
  endfunction

  function automatic void xoo_rhowest_iota(ref xoo_t a, input int unsigned r);
    w32 c [12] = '{32'h058, 32'h038, 32'h3C0, 32'h0D0, 32'h120, 32'h014,
                   32'h060, 32'h02C, 32'h380, 32'h0F0, 32'h1A0, 32'h012};
    w32 p1 [4];
    for (int x = 0; x < 4; x++) p1[x] = a[1][x];
    for (int x = 0; x < 4; x++) begin
      a[1][(x + 1) % 4] = p1[x];
      a[2][x] = rol(a[2][x], 11);
    end
    a[0][0] ^= c[r];
  endfunction

  function automatic void xoo_chi(ref xoo_t a);
    xoo_t b;
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 4; x++) b[y][x] = a[y][x] ^ (~a[(y + 1) % 3][x] & a[(y + 2) % 3][x]);
    a = b;
  endfunction

  function automatic void xoo_rhoeast(ref xoo_t a);
    w32 p2 [4];
    for (int x = 0; x < 4; x++) p2[x] = a[2][x];
    for (int x = 0; x < 4; x++) begin
      a[1][x] = rol(a[1][x], 1);
      a[2][(x + 2) % 4] = rol(p2[x], 8);
    end
  endfunction

  function automatic void xoo_perm(ref xoo_t a, input int unsigned n);
    for (int unsigned r = 12 - n; r < 12; r++) begin
      xoo_theta(a); xoo_rhowest_iota(a, r); xoo_chi(a); xoo_rhoeast(a);
    end
  endfunction

  // ------------------------------------------------------------------ TinyJAMBU (bit level)
  function automatic void tj_steps(ref logic [127:0] s, input logic [127:0] k, input int unsigned nsteps);
    logic fb;
    for (int unsigned i = 0; i < nsteps; i++) begin
      fb = s[0] ^ s[47] ^ ~(s[70] & s[85]) ^ s[91] ^ k[i % 128];
      s  = {fb, s[127:1]};
    end
  endfunction

  // ------------------------------------------------------------------ GIFT / PHOTON S-boxes
  function automatic void sbox_cells(ref w32 s [4], input logic [3:0] tbl [16]);
    logic [3:0] n;
    w32 r [4];
    for (int i = 0; i < 32; i++) begin
      n = {s[3][i], s[2][i], s[1][i], s[0][i]};
      for (int j = 0; j < 4; j++) r[j][i] = tbl[n][j];
    end
    s = r;
  endfunction

  function automatic void gift_sbox(ref w32 s [4]);
    logic [3:0] gs [16] = '{4'h1, 4'hA, 4'h4, 4'hC, 4'h6, 4'hF, 4'h3, 4'h9,
                            4'h2, 4'hD, 4'hB, 4'h7, 4'h5, 4'h0, 4'h8, 4'hE};
    sbox_cells(s, gs);
  endfunction

  function automatic void photon_sbox(ref w32 s [4]);
    logic [3:0] ps [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                            4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};
    sbox_cells(s, ps);
  endfunction

  // ------------------------------------------------------------------ Sparkle256
  function automatic void spk_arx(ref w32 st [8], input int unsigned step);
    w32 rcon [8] = '{32'hB7E15162, 32'hBF715880, 32'h38B4DA56, 32'h324E7738,
                     32'hBB1185EB, 32'h4F7C7B57, 32'hCFBFA1C8, 32'hC2B3293D};
    w32 x, y;
    st[1] ^= rcon[step % 8];
    st[3] ^= step;
    for (int i = 0; i < 4; i++) begin
      x = st[2*i]; y = st[2*i+1];
      x += ror(y, 31); y ^= ror(x, 24); x ^= rcon[i];
      x += ror(y, 17); y ^= ror(x, 17); x ^= rcon[i];
      x += y;          y ^= ror(x, 31); x ^= rcon[i];
      x += ror(y, 24); y ^= ror(x, 16); x ^= rcon[i];
      st[2*i] = x; st[2*i+1] = y;
    end
  endfunction

  function automatic void spk_linear(ref w32 st [8]);
    w32 x [4];
    w32 y [4];
    w32 tmp;
    for (int i = 0; i < 4; i++) begin x[i] = st[2*i]; y[i] = st[2*i+1]; end
    tmp = x[0] ^ x[1];
    tmp = ror(tmp ^ (tmp << 16), 16);
    y[2] ^= tmp ^ y[0];
    y[3] ^= tmp ^ y[1];
    tmp = y[0] ^ y[1];
    tmp = ror(tmp ^ (tmp << 16), 16);
    x[2] ^= tmp ^ x[0];
    x[3] ^= tmp ^ x[1];
    // branch swap as in the reference loop for two branches per half
    tmp = x[0]; x[0] = x[3]; x[3] = x[1]; x[1] = x[2]; x[2] = tmp;
    tmp = y[0]; y[0] = y[3]; y[3] = y[1]; y[1] = y[2]; y[2] = tmp;
    for (int i = 0; i < 4; i++) begin st[2*i] = x[i]; st[2*i+1] = y[i]; end
  endfunction

  function automatic void spk_perm(ref w32 st [8], input int unsigned n);
    for (int unsigned k = 0; k < n; k++) begin spk_arx(st, k); spk_linear(st); end
  endfunction

  // ------------------------------------------------------------------ Grain-128AEAD (bit level)
  function automatic void grain_word(ref logic lf [128], ref logic nf [128], output w32 z);
    logic y, a, b;
    for (int t = 0; t < 32; t++) begin
      y = (nf[12] & lf[8]) ^ (lf[13] & lf[20]) ^ (nf[95] & lf[42]) ^ (lf[60] & lf[79])
        ^ (nf[12] & nf[95] & lf[94]) ^ lf[93];
      foreach (nf[j]) if (j inside {2, 15, 36, 45, 64, 73, 89}) y ^= nf[j];
      a = lf[0] ^ lf[7] ^ lf[38] ^ lf[70] ^ lf[81] ^ lf[96];
      b = lf[0] ^ nf[0] ^ nf[26] ^ nf[56] ^ nf[91] ^ nf[96] ^ (nf[3] & nf[67]) ^ (nf[11] & nf[13])
        ^ (nf[17] & nf[18]) ^ (nf[27] & nf[59]) ^ (nf[40] & nf[48]) ^ (nf[61] & nf[65])
        ^ (nf[68] & nf[84]) ^ (nf[22] & nf[24] & nf[25]) ^ (nf[70] & nf[78] & nf[82])
        ^ (nf[88] & nf[92] & nf[93] & nf[95]);
      for (int j = 0; j < 127; j++) begin lf[j] = lf[j+1]; nf[j] = nf[j+1]; end
      lf[127] = a; nf[127] = b;
      z[t] = y;
    end
  endfunction

  // ------------------------------------------------------------------ PHOTON-256
  // Cell array form with the precomputed MixColumn matrix (the eighth power of the
  // serial matrix), row by row.
  typedef logic [3:0] pc_t [8][8];   // [row][col]

  function automatic logic [3:0] ph_gmul(logic [3:0] a, logic [3:0] b);
    logic [7:0] r;
    r = '0;
    for (int i = 0; i < 4; i++) if (b[i]) r ^= 8'(a) << i;
    for (int i = 7; i >= 4; i--) if (r[i]) r ^= 8'h13 << (i - 4);
    return r[3:0];
  endfunction

  function automatic void photon_perm(ref w32 s [8], input int unsigned n);
    logic [3:0] ps [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                            4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};
    int rc [12] = '{1, 3, 7, 14, 13, 11, 6, 12, 9, 2, 5, 10};
    int ic [8]  = '{0, 1, 3, 7, 15, 14, 12, 8};
    int mm [8][8] = '{'{2, 4, 2, 11, 2, 8, 5, 6}, '{12, 9, 8, 13, 7, 7, 5, 2},
                      '{4, 4, 13, 13, 9, 4, 13, 9}, '{1, 6, 5, 1, 12, 13, 15, 14},
                      '{15, 12, 9, 13, 14, 5, 14, 13}, '{9, 14, 5, 15, 4, 12, 9, 6},
                      '{12, 2, 2, 10, 3, 1, 1, 14}, '{15, 1, 13, 10, 5, 10, 2, 3}};
    pc_t x, y;
    for (int i = 0; i < 8; i++)
      for (int c = 0; c < 8; c++)
        for (int j = 0; j < 4; j++) x[i][c][j] = s[4*(i/4) + j][8*(i%4) + c];
    for (int k = 12 - int'(n); k < 12; k++) begin
      for (int i = 0; i < 8; i++) x[i][0] ^= 4'(rc[k] ^ ic[i]);
      for (int i = 0; i < 8; i++) for (int c = 0; c < 8; c++) x[i][c] = ps[x[i][c]];
      for (int i = 0; i < 8; i++) for (int c = 0; c < 8; c++) y[i][c] = x[i][(c + i) % 8];
      for (int c = 0; c < 8; c++)
        for (int i = 0; i < 8; i++) begin
          x[i][c] = '0;
          for (int m = 0; m < 8; m++) x[i][c] ^= ph_gmul(4'(mm[i][m]), y[m][c]);
        end
    end
    for (int i = 0; i < 8; i++)
      for (int c = 0; c < 8; c++)
        for (int j = 0; j < 4; j++) s[4*(i/4) + j][8*(i%4) + c] = x[i][c][j];
  endfunction

endpackage
