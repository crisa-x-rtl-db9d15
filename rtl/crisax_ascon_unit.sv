// crisax_ascon_unit: Ascon-p block and procedure instructions on a bit-interleaved state.
//
// The 320-bit Ascon state x0..x4 (five 64-bit words) lives in ten 32-bit extended
// registers in the order x0e, x0o, x1e, x1o, ... x4e, x4o: the "e" register holds
// the bits at even positions of the 64-bit word (bit 2k in bit k), the "o" register
// the bits at odd positions. Conversion between the two views is pure wiring, so the
// unit works on 64-bit words internally and never pays for the interleaving.
//
// Instructions (blk_op_e):
//   ASCON_NONLINEAR imm=r : add round constant of round r (0..11), then the S-box layer
//   ASCON_LINEAR          : the linear diffusion layer (rotations by 19/28, 61/39, 1/6,
//                           10/17, 7/41)
//   ASCON_PERM      imm=n : the last n rounds of the 12-round permutation (p6, p8, p12)
// Timing: in_valid in cycle t gives out_valid and out_st in cycle t+1 (combinational
// from a pipeline register). The substitution layer runs in the first cycle and the
// linear layer in the second; for ASCON_PERM rounds 0-5 run in the first cycle and
// rounds 6-11 in the second. Splitting the procedure into two cycles follows the
// design's description; the exact split point and the constant addition inside
// ASCON_NONLINEAR are this implementation's choices.
module crisax_ascon_unit
  import crisax_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  blk_op_e       in_op,
  input  word_t         in_imm,
  input  word_t [9:0]   in_st,
  output logic          out_valid,
  output word_t [9:0]   out_st
);

  typedef logic [63:0] lane_t;
  typedef lane_t [4:0] ast_t;

  function automatic lane_t ror64(lane_t x, int unsigned n);
    return (x >> n) | (x << (64 - n));
  endfunction

  function automatic ast_t from_words(word_t [9:0] w);
    ast_t s;
    for (int i = 0; i < 5; i++)
      for (int k = 0; k < 32; k++) begin
        s[i][2*k]   = w[2*i][k];
        s[i][2*k+1] = w[2*i+1][k];
      end
    return s;
  endfunction

  function automatic word_t [9:0] to_words(ast_t s);
    word_t [9:0] w;
    for (int i = 0; i < 5; i++)
      for (int k = 0; k < 32; k++) begin
        w[2*i][k]   = s[i][2*k];
        w[2*i+1][k] = s[i][2*k+1];
      end
    return w;
  endfunction

  // Round constant of round r of the 12-round schedule.
  function automatic lane_t rc(logic [3:0] r4);
    return {56'h0, 4'hf - r4, r4};
  endfunction

  function automatic ast_t sbox_layer(ast_t x, logic [3:0] r);
    ast_t  y;
    lane_t [4:0] t;
    y = x;
    y[2] ^= rc(r);
    y[0] ^= y[4]; y[4] ^= y[3]; y[2] ^= y[1];
    for (int i = 0; i < 5; i++) t[i] = ~y[i] & y[(i+1)%5];
    for (int i = 0; i < 5; i++) y[i] ^= t[(i+1)%5];
    y[1] ^= y[0]; y[0] ^= y[4]; y[3] ^= y[2]; y[2] = ~y[2];
    return y;
  endfunction

  function automatic ast_t linear_layer(ast_t x);
    ast_t y;
    y[0] = x[0] ^ ror64(x[0], 19) ^ ror64(x[0], 28);
    y[1] = x[1] ^ ror64(x[1], 61) ^ ror64(x[1], 39);
    y[2] = x[2] ^ ror64(x[2],  1) ^ ror64(x[2],  6);
    y[3] = x[3] ^ ror64(x[3], 10) ^ ror64(x[3], 17);
    y[4] = x[4] ^ ror64(x[4],  7) ^ ror64(x[4], 41);
    return y;
  endfunction

  // Apply rounds lo..hi of the 12-round schedule, skipping those before 12-n.
  function automatic ast_t rounds(ast_t x, int unsigned n, int unsigned lo, int unsigned hi);
    ast_t y;
    y = x;
    for (int unsigned r = lo; r <= hi; r++)
      if (r + n >= 12) y = linear_layer(sbox_layer(y, 4'(r)));
    return y;
  endfunction

  function automatic int unsigned nrounds(word_t imm);
    return (imm > 12) ? 12 : int'(imm);
  endfunction

  // Stage 1
  ast_t    s_in, s1;
  always_comb begin
    s_in = from_words(in_st);
    case (in_op)
      ASCON_NONLINEAR: s1 = sbox_layer(s_in, 4'(int'(in_imm[3:0]) % 12));
      ASCON_PERM:      s1 = rounds(s_in, nrounds(in_imm), 0, 5);
      default:         s1 = s_in;
    endcase
  end

  logic    v_q;
  blk_op_e op_q;
  word_t   imm_q;
  ast_t    s_q;

  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
    if (in_valid) begin
      op_q  <= in_op;
      imm_q <= in_imm;
      s_q   <= s1;
    end
  end

  // Stage 2
  ast_t s2;
  always_comb begin
    case (op_q)
      ASCON_LINEAR: s2 = linear_layer(s_q);
      ASCON_PERM:   s2 = rounds(s_q, nrounds(imm_q), 6, 11);
      default:      s2 = s_q;
    endcase
  end

  assign out_valid = v_q;
  assign out_st    = to_words(s2);

endmodule
