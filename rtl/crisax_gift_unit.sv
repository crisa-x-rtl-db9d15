// crisax_gift_unit: GIFT-128 bitsliced block instructions (GIFT-COFB).
//
// The 128-bit GIFT state is four 32-bit bit-slices s0..s3: bit i of slice j is bit j of
// the i-th 4-bit cell.
//
// Instructions (blk_op_e), window of four registers:
//   GIFT_SBOX     : the GIFT S-box on all 32 cells at once, as the fused sequence
//                   s1^=s0&s2; s0^=s1&s3; s2^=s0|s1; s3^=s2; s1^=s3; s3=~s3; s2^=s0&s1
//                   followed by exchanging s0 and s3 (the bitsliced form of the 32-bit
//                   reference code)
//   GIFT_SWAPMOVE : window {a, b, mask, shift}: t = (b ^ (a >> shift)) & mask;
//                   a ^= t << shift; b ^= t; mask and shift pass through
// Timing: in_valid in cycle t gives out_valid in cycle t+1; the operation is done in the
// first cycle and registered. The design also describes a whole QUINTUPLE_ROUND
// procedure; it is not part of this unit.
module crisax_gift_unit
  import crisax_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  blk_op_e       in_op,
  input  word_t         in_imm,
  input  word_t [3:0]   in_st,
  output logic          out_valid,
  output word_t [3:0]   out_st
);

  typedef word_t [3:0] gst_t;

  function automatic gst_t sbox(gst_t s);
    word_t s0, s1, s2, s3;
    gst_t  r;
    s0 = s[0]; s1 = s[1]; s2 = s[2]; s3 = s[3];
    s1 ^= s0 & s2;
    s0 ^= s1 & s3;
    s2 ^= s0 | s1;
    s3 ^= s2;
    s1 ^= s3;
    s3 = ~s3;
    s2 ^= s0 & s1;
    r[0] = s3; r[1] = s1; r[2] = s2; r[3] = s0;
    return r;
  endfunction

  function automatic gst_t swapmove(gst_t s);
    gst_t  r;
    word_t t;
    int unsigned n;
    n    = int'(s[3][4:0]);
    t    = (s[1] ^ (s[0] >> n)) & s[2];
    r    = s;
    r[0] = s[0] ^ (t << n);
    r[1] = s[1] ^ t;
    return r;
  endfunction

  gst_t s1;
  always_comb begin
    case (in_op)
      GIFT_SBOX:     s1 = sbox(in_st);
      GIFT_SWAPMOVE: s1 = swapmove(in_st);
      default:       s1 = in_st;
    endcase
  end

  logic v_q;
  gst_t s_q;

  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
    if (in_valid) s_q <= s1;
  end

  assign out_valid = v_q;
  assign out_st    = s_q;

  // The immediate carries nothing for these instructions.
  logic unused_imm;
  assign unused_imm = ^in_imm;

endmodule
