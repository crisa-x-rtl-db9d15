// crisax_grain_unit: Grain-128AEAD block and procedure instructions.
//
// Window (9 registers): words 0-3 are the 128-bit LFSR (state bit i is bit i%32 of word
// i/32, so bit 0 is the next bit to leave), words 4-7 the 128-bit NFSR in the same
// layout, word 8 the keystream/accumulator word.
//
// Instructions (blk_op_e):
//   GRAIN_BLOCKROTXOR : window {s0,s1,s2,s3,x}: x ^= (s0<<7)^(s1>>25) ^ (s1<<6)^(s2>>26)
//                       ^ (s2<<6)^(s3>>26) ^ (s2<<17)^(s3>>15); s0..s3 pass through.
//                       These are the four word extractions of the 32-bit reference code
//                       fused into one instruction.
//   GRAIN_KEYSTREAM   : 32 clocks of the pre-output generator in keystream mode:
//                       y = h(b,s) ^ s93 ^ b2^b15^b36^b45^b64^b73^b89 with
//                       h = b12 s8 ^ s13 s20 ^ b95 s42 ^ s60 s79 ^ b12 b95 s94,
//                       LFSR feedback s0^s7^s38^s70^s81^s96, NFSR feedback s0 ^ g(b).
//                       Bit t of word 8 receives y of clock t.
// Timing: in_valid in cycle t gives out_valid in cycle t+1. BLOCKROTXOR runs in the
// first cycle; GRAIN_KEYSTREAM runs clocks 0-15 in the first cycle and 16-31 in the
// second. The bit layout and the split are this implementation's choices.
module crisax_grain_unit
  import crisax_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  blk_op_e       in_op,
  input  word_t         in_imm,
  input  word_t [8:0]   in_st,
  output logic          out_valid,
  output word_t [8:0]   out_st
);

  typedef word_t [8:0] gwin_t;

  function automatic gwin_t blockrotxor(gwin_t w);
    gwin_t r;
    r = w;
    r[4] = w[4] ^ (w[0] << 7) ^ (w[1] >> 25)
                ^ (w[1] << 6) ^ (w[2] >> 26)
                ^ (w[2] << 6) ^ (w[3] >> 26)
                ^ (w[2] << 17) ^ (w[3] >> 15);
    return r;
  endfunction

  // Clocks lo..hi of a 32-clock keystream word.
  function automatic gwin_t clocks(gwin_t w, int unsigned lo, int unsigned hi);
    logic [127:0] s, b;
    logic         y, fs, fb;
    gwin_t        r;
    s = {w[3], w[2], w[1], w[0]};
    b = {w[7], w[6], w[5], w[4]};
    r = w;
    for (int unsigned t = lo; t <= hi; t++) begin
      y  = (b[12] & s[8]) ^ (s[13] & s[20]) ^ (b[95] & s[42]) ^ (s[60] & s[79])
         ^ (b[12] & b[95] & s[94]) ^ s[93]
         ^ b[2] ^ b[15] ^ b[36] ^ b[45] ^ b[64] ^ b[73] ^ b[89];
      fs = s[0] ^ s[7] ^ s[38] ^ s[70] ^ s[81] ^ s[96];
      fb = s[0] ^ b[0] ^ b[26] ^ b[56] ^ b[91] ^ b[96]
         ^ (b[3] & b[67]) ^ (b[11] & b[13]) ^ (b[17] & b[18]) ^ (b[27] & b[59])
         ^ (b[40] & b[48]) ^ (b[61] & b[65]) ^ (b[68] & b[84])
         ^ (b[22] & b[24] & b[25]) ^ (b[70] & b[78] & b[82])
         ^ (b[88] & b[92] & b[93] & b[95]);
      s = {fs, s[127:1]};
      b = {fb, b[127:1]};
      r[8][t] = y;
    end
    {r[3], r[2], r[1], r[0]} = s;
    {r[7], r[6], r[5], r[4]} = b;
    return r;
  endfunction

  gwin_t s1;
  always_comb begin
    case (in_op)
      GRAIN_BLOCKROTXOR: s1 = blockrotxor(in_st);
      GRAIN_KEYSTREAM:   s1 = clocks(in_st, 0, 15);
      default:           s1 = in_st;
    endcase
  end

  logic    v_q;
  blk_op_e op_q;
  gwin_t   s_q;

  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
    if (in_valid) begin
      op_q <= in_op;
      s_q  <= s1;
    end
  end

  always_comb begin
    if (op_q == GRAIN_KEYSTREAM) out_st = clocks(s_q, 16, 31);
    else                         out_st = s_q;
  end

  assign out_valid = v_q;

  logic unused_imm;
  assign unused_imm = ^in_imm;

endmodule
