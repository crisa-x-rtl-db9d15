// crisax_keccak200_unit: Keccak-f[200] block and procedure instructions (Elephant/Delirium).
//
// The 200-bit state is 25 lanes of 8 bits, lane index i = x + 5*y. Four lanes are packed
// per 32-bit register: lane i sits in bits 8*(i%4)+7 .. 8*(i%4) of register i/4, so the
// state fills seven registers and lane 24 is the low byte of the seventh. The upper
// 24 bits of the seventh register are passed through unchanged.
//
// Instructions (blk_op_e):
//   KEC_THETA          : column parity mixing
//   KEC_RHO            : per-lane rotations (offsets (t+1)(t+2)/2 mod 8)
//   KEC_PI             : lane transposition (x,y) -> (y, 2x+3y)
//   KEC_CHI   imm=r    : non-linear row step followed by iota with the constant of round r
//   KEC_PERM  imm=n    : the last n rounds of Keccak-p[200] (n <= 18; 18 = Keccak-f[200])
// The round constants and rotation offsets are a hardwired table computed at elaboration
// from the Keccak definitions. Timing: in_valid in cycle t gives out_valid in cycle t+1.
// theta and rho run in the first cycle, pi and chi in the second; the permutation runs
// rounds 0-8 in the first cycle and 9-17 in the second. The packing and the split are
// this implementation's choices; the step set follows the design's theta/rho/chi blocks
// and whole-permutation procedure.
module crisax_keccak200_unit
  import crisax_pkg::*;
#(
  parameter int unsigned ROUNDS = 18
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  blk_op_e       in_op,
  input  word_t         in_imm,
  input  word_t [6:0]   in_st,
  output logic          out_valid,
  output word_t [6:0]   out_st
);

  typedef logic [7:0]  lane_t;
  typedef lane_t [24:0] kst_t;
  typedef logic [24:0][2:0] rho_t;
  typedef lane_t [ROUNDS-1:0] rc_t;

  localparam int unsigned HALF = (ROUNDS + 1) / 2;

  function automatic rho_t rho_offsets();
    rho_t o;
    int unsigned x, y, nx;
    o = '0;
    x = 1; y = 0;
    for (int unsigned t = 0; t < 24; t++) begin
      o[x + 5*y] = 3'(((t + 1) * (t + 2) / 2) % 8);
      nx = y;
      y  = (2*x + 3*y) % 5;
      x  = nx;
    end
    return o;
  endfunction

  // Round constants from the degree-8 LFSR x^8+x^6+x^5+x^4+1.
  function automatic logic rc_bit(int unsigned t);
    logic [8:0] r;
    r = 9'h001;
    for (int unsigned i = 0; i < t % 255; i++) begin
      r = r << 1;
      if (r[8]) r = r ^ 9'h171;
    end
    return r[0];
  endfunction

  function automatic rc_t round_constants();
    rc_t c;
    for (int unsigned ir = 0; ir < ROUNDS; ir++) begin
      c[ir] = '0;
      for (int unsigned j = 0; j < 4; j++)
        c[ir][(1 << j) - 1] = rc_bit(j + 7*ir);
    end
    return c;
  endfunction

  localparam rho_t RHO = rho_offsets();
  localparam rc_t  RC  = round_constants();

  function automatic lane_t rol8(lane_t v, int unsigned n);
    return (v << n) | (v >> ((8 - n) % 8));
  endfunction

  function automatic kst_t theta(kst_t a);
    lane_t [4:0] c, d;
    kst_t b;
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rol8(c[(x+1)%5], 1);
    for (int i = 0; i < 25; i++) b[i] = a[i] ^ d[i%5];
    return b;
  endfunction

  function automatic kst_t rho(kst_t a);
    kst_t b;
    for (int i = 0; i < 25; i++) b[i] = rol8(a[i], int'(RHO[i]));
    return b;
  endfunction

  function automatic kst_t pi(kst_t a);
    kst_t b;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = a[x + 5*y];
    return b;
  endfunction

  function automatic kst_t chi_iota(kst_t a, int unsigned r);
    kst_t b;
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        b[x + 5*y] = a[x + 5*y] ^ (~a[(x+1)%5 + 5*y] & a[(x+2)%5 + 5*y]);
    b[0] ^= RC[r % ROUNDS];
    return b;
  endfunction

  function automatic kst_t rounds(kst_t a, int unsigned n, int unsigned lo, int unsigned hi);
    kst_t b;
    b = a;
    for (int unsigned r = lo; r <= hi; r++)
      if (r < ROUNDS && r + n >= ROUNDS) b = chi_iota(pi(rho(theta(b))), r);
    return b;
  endfunction

  function automatic kst_t unpack(word_t [6:0] w);
    kst_t a;
    for (int i = 0; i < 25; i++) a[i] = w[i/4][8*(i%4) +: 8];
    return a;
  endfunction

  function automatic word_t [6:0] pack(kst_t a, logic [23:0] hi_keep);
    word_t [6:0] w;
    w = '0;
    for (int i = 0; i < 25; i++) w[i/4][8*(i%4) +: 8] = a[i];
    w[6][31:8] = hi_keep;
    return w;
  endfunction

  function automatic int unsigned nr(word_t imm);
    return (imm > ROUNDS) ? ROUNDS : int'(imm);
  endfunction

  kst_t a_in, a1;
  always_comb begin
    a_in = unpack(in_st);
    case (in_op)
      KEC_THETA: a1 = theta(a_in);
      KEC_RHO:   a1 = rho(a_in);
      KEC_PERM:  a1 = rounds(a_in, nr(in_imm), 0, HALF - 1);
      default:   a1 = a_in;
    endcase
  end

  logic    v_q;
  blk_op_e op_q;
  word_t   imm_q;
  logic [23:0] hi_q;
  kst_t    a_q;

  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
    if (in_valid) begin
      op_q  <= in_op;
      imm_q <= in_imm;
      hi_q  <= in_st[6][31:8];
      a_q   <= a1;
    end
  end

  kst_t a2;
  always_comb begin
    case (op_q)
      KEC_PI:   a2 = pi(a_q);
      KEC_CHI:  a2 = chi_iota(a_q, int'(imm_q[4:0]));
      KEC_PERM: a2 = rounds(a_q, nr(imm_q), HALF, ROUNDS - 1);
      default:  a2 = a_q;
    endcase
  end

  assign out_valid = v_q;
  assign out_st    = pack(a2, hi_q);

endmodule
