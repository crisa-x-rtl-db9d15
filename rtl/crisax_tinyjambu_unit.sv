// crisax_tinyjambu_unit: TinyJAMBU keyed-permutation block and procedure instructions.
//
// The 128-bit NFSR state is four 32-bit registers s0..s3 (s0 holds state bits 0..31).
// One "phase" advances the register by 32 steps at once by replacing word j with
//   s[j] ^ t1 ^ ~(t2 & t3) ^ t4 ^ k
// where t1, t2, t3, t4 are the 32-bit words at state bit offsets 47, 70, 85 and 91
// counted from word j (each taken from two adjacent words by a double shift).
//
// Instructions (blk_op_e):
//   TJ_ROTORBLOCK   imm=j : window {s0,s1,s2,s3,k}; one phase updating word j (0..3)
//                           with key word k; the other words pass through
//   TJ_STATE_UPDATE imm=m : window {s0..s3,k0..k3}; 128*m steps (m = 5 for 640 steps,
//                           m = 8 for 1024 steps, at most MAXBLK)
// Timing: in_valid in cycle t gives out_valid in cycle t+1. ROTORBLOCK runs in the
// first cycle. STATE_UPDATE runs the first half of its 128-step blocks in the first
// cycle and the rest in the second. The feedback follows the design's description of
// the state-update; the phase selection by immediate and the block count by immediate
// are this implementation's choices.
module crisax_tinyjambu_unit
  import crisax_pkg::*;
#(
  parameter int unsigned MAXBLK = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  blk_op_e       in_op,
  input  word_t         in_imm,
  input  word_t [7:0]   in_st,
  output logic          out_valid,
  output word_t [7:0]   out_st
);

  typedef word_t [3:0] tst_t;
  localparam int unsigned HALF = (MAXBLK + 1) / 2;

  function automatic word_t dshr(word_t lo, word_t hi, int unsigned n);
    return (lo >> n) | (hi << (32 - n));
  endfunction

  function automatic tst_t phase(tst_t s, int unsigned j, word_t k);
    tst_t  r;
    word_t a, b, c, t1, t2, t3, t4;
    r  = s;
    a  = s[(j+1)%4];
    b  = s[(j+2)%4];
    c  = s[(j+3)%4];
    t1 = dshr(a, b, 15);
    t2 = dshr(b, c, 6);
    t3 = dshr(b, c, 21);
    t4 = dshr(b, c, 27);
    r[j] = s[j] ^ t1 ^ ~(t2 & t3) ^ t4 ^ k;
    return r;
  endfunction

  function automatic tst_t blocks(tst_t s, word_t [3:0] k, int unsigned m, int unsigned lo, int unsigned hi);
    tst_t r;
    r = s;
    for (int unsigned b = lo; b <= hi; b++)
      if (b < m)
        for (int unsigned j = 0; j < 4; j++) r = phase(r, j, k[j]);
    return r;
  endfunction

  function automatic int unsigned nblk(word_t imm);
    return (imm > MAXBLK) ? MAXBLK : int'(imm);
  endfunction

  word_t [7:0] s1;
  always_comb begin
    s1 = in_st;
    case (in_op)
      TJ_ROTORBLOCK:   s1[3:0] = phase(in_st[3:0], int'(in_imm[1:0]), in_st[4]);
      TJ_STATE_UPDATE: s1[3:0] = blocks(in_st[3:0], in_st[7:4], nblk(in_imm), 0, HALF - 1);
      default: ;
    endcase
  end

  logic        v_q;
  blk_op_e     op_q;
  word_t       imm_q;
  word_t [7:0] s_q;

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
    out_st = s_q;
    if (op_q == TJ_STATE_UPDATE)
      out_st[3:0] = blocks(s_q[3:0], s_q[7:4], nblk(imm_q), HALF, MAXBLK - 1);
  end

  assign out_valid = v_q;

endmodule
