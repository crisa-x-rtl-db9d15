// crisax_xoodoo_unit: Xoodoo block and procedure instructions (Xoodyak).
//
// The 384-bit Xoodoo state is three planes of four 32-bit lanes; lane x of plane y is
// register 4*y + x of the 12-register window.
//
// Instructions (blk_op_e):
//   XOO_THETA            : column parity mixing, E = (P<<<(1,5)) ^ (P<<<(1,14))
//   XOO_RHOWEST imm=r    : plane 1 shifted by one lane, plane 2 rotated by 11, then iota
//                          with the round constant of round r (0..11)
//   XOO_CHI              : 3-bit column S-box, B_y = ~A_{y+1} & A_{y+2}
//   XOO_RHOEAST          : plane 1 rotated by 1, plane 2 shifted by two lanes and rotated by 8
//   XOO_PERM    imm=n    : the last n rounds of the 12-round permutation
// The round constants are a hardwired table (the "custom state" holding RC[i]).
// Timing: in_valid in cycle t gives out_valid in cycle t+1. theta and rho-west run in
// the first cycle, chi and rho-east in the second; the permutation runs rounds 0-5 in the
// first cycle and 6-11 in the second. Placing iota in the rho-west instruction and the
// two-cycle split are this implementation's choices.
module crisax_xoodoo_unit
  import crisax_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  blk_op_e       in_op,
  input  word_t         in_imm,
  input  word_t [11:0]  in_st,
  output logic          out_valid,
  output word_t [11:0]  out_st
);

  typedef word_t [11:0] xst_t;
  typedef logic [11:0] [9:0] xrc_t;

  // Round constants, first round first.
  localparam xrc_t RC = {10'h012, 10'h1A0, 10'h0F0, 10'h380, 10'h02C, 10'h060,
                         10'h014, 10'h120, 10'h0D0, 10'h3C0, 10'h038, 10'h058};

  function automatic xst_t theta(xst_t a);
    word_t [3:0] p, e;
    xst_t b;
    for (int x = 0; x < 4; x++) p[x] = a[x] ^ a[4+x] ^ a[8+x];
    for (int x = 0; x < 4; x++) e[x] = rol32(p[(x+3)%4], 5) ^ rol32(p[(x+3)%4], 14);
    for (int i = 0; i < 12; i++) b[i] = a[i] ^ e[i%4];
    return b;
  endfunction

  function automatic xst_t rho_west_iota(xst_t a, int unsigned r);
    xst_t b;
    for (int x = 0; x < 4; x++) begin
      b[x]   = a[x];
      b[4+x] = a[4 + (x+3)%4];
      b[8+x] = rol32(a[8+x], 11);
    end
    b[0] ^= word_t'(RC[r % 12]);
    return b;
  endfunction

  function automatic xst_t chi(xst_t a);
    xst_t b;
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 4; x++)
        b[4*y+x] = a[4*y+x] ^ (~a[4*((y+1)%3)+x] & a[4*((y+2)%3)+x]);
    return b;
  endfunction

  function automatic xst_t rho_east(xst_t a);
    xst_t b;
    for (int x = 0; x < 4; x++) begin
      b[x]   = a[x];
      b[4+x] = rol32(a[4+x], 1);
      b[8+x] = rol32(a[8 + (x+2)%4], 8);
    end
    return b;
  endfunction

  function automatic xst_t rounds(xst_t a, int unsigned n, int unsigned lo, int unsigned hi);
    xst_t b;
    b = a;
    for (int unsigned r = lo; r <= hi; r++)
      if (r + n >= 12) b = rho_east(chi(rho_west_iota(theta(b), r)));
    return b;
  endfunction

  function automatic int unsigned nr(word_t imm);
    return (imm > 12) ? 12 : int'(imm);
  endfunction

  xst_t s1;
  always_comb begin
    case (in_op)
      XOO_THETA:   s1 = theta(in_st);
      XOO_RHOWEST: s1 = rho_west_iota(in_st, int'(in_imm[3:0]));
      XOO_PERM:    s1 = rounds(in_st, nr(in_imm), 0, 5);
      default:     s1 = in_st;
    endcase
  end

  logic    v_q;
  blk_op_e op_q;
  word_t   imm_q;
  xst_t    s_q;

  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
    if (in_valid) begin
      op_q  <= in_op;
      imm_q <= in_imm;
      s_q   <= s1;
    end
  end

  always_comb begin
    case (op_q)
      XOO_CHI:     out_st = chi(s_q);
      XOO_RHOEAST: out_st = rho_east(s_q);
      XOO_PERM:    out_st = rounds(s_q, nr(imm_q), 6, 11);
      default:     out_st = s_q;
    endcase
  end

  assign out_valid = v_q;

endmodule
