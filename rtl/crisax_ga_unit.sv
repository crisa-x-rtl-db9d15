// crisax_ga_unit: Generic-Atomic (GA) functional unit of the CrISA-X extension.
//
// A purely combinational unit that computes one fused bitwise instruction from up to
// five 32-bit source registers and four immediates, producing one or two results. In
// the execute stage it finishes in the same cycle it is issued (single-cycle
// instructions); the register file writes the results at the end of that cycle.
// These instructions are algorithm-agnostic: the same set serves Ascon, Keccak,
// GIFT, Grain, PHOTON, Romulus, Sparkle, TinyJAMBU and Xoodoo code.
//
// Semantics (s = src, i = imm, r = res; rotations are 32-bit, shift counts mod 32):
//   XORNOTAND   r0 = s0 ^ (~s1 & s2)
//   XORROT      r0 = s0 ^ ror(s1, i0)
//   ROLXOR      r0 = s0 ^ rol(s1, i0)
//   XOR2        r0 = s0 ^ s1            r1 = s2 ^ s3
//   XOR2IMD     r0 = s0 ^ i0            r1 = s1 ^ i1
//   XOR3        r0 = s0 ^ s1 ^ s2
//   XOR5        r0 = s0 ^ s1 ^ s2 ^ s3 ^ s4
//   ROTXOR      r0 = s0 ^ (s1 >> i0) ^ (s2 << i1)
//   ROTOR       r0 = ((s0 >> i0) & i2) | ((s1 << i1) & i3)
//   XORAND      r0 = s0 ^ (s1 & s2)
//   XOROR       r0 = s0 ^ (s1 | s2)
//   XOROR2      r0 = s0 ^ s1            r1 = s2 | s3
//   XORAND2     r0 = s0 ^ s1            r1 = s2 & s3
//   XORNOTOR    r0 = s0 ^ ~(s1 | s2)
//   NOTAND      r0 = ~(s0 & s1)
//   SWAPMOVE    t = (s1 ^ (s0 >> s3)) & s2;   r0 = s0 ^ (t << s3)   r1 = s1 ^ t
//   XORSHIFTAND r0 = (s0 ^ (s1 >> s2)) & i0
//   SHIFTLXOR   r0 = s0 ^ (s1 << i0)
//   SHIFTLOR    r0 = s0 | (s1 << i0)
//   INTLV       64-bit {s1,s0} to bit-interleaved form: r0 = even bits, r1 = odd bits
//   DEINTLV     inverse of INTLV: {r1,r0} = 64-bit word from even s0 and odd s1
//   BSWAP       r0 = byte-reversed s0   r1 = byte-reversed s1
// we[k] says whether result k is written. The operand order and the shift/rotate
// direction of each instruction follow the design's instruction descriptions where
// they are printed; the two-register forms of ROTOR and ROTXOR, and the exact forms of
// ROLXOR, SHIFTLXOR, SHIFTLOR, INTLV, DEINTLV and BSWAP, are this implementation's.
module crisax_ga_unit
  import crisax_pkg::*;
(
  input  ga_op_e               op,
  input  word_t [NGASRC-1:0]   src,
  input  word_t [NGAIMM-1:0]   imm,
  output word_t [1:0]          res,
  output logic  [1:0]          we
);

  function automatic word_t bswap(word_t v);
    return {v[7:0], v[15:8], v[23:16], v[31:24]};
  endfunction

  word_t t_sm;
  logic [4:0] sh0, sh1, shs;

  always_comb begin
    sh0  = imm[0][4:0];
    sh1  = imm[1][4:0];
    shs  = src[3][4:0];
    t_sm = (src[1] ^ (src[0] >> shs)) & src[2];
    res  = '0;
    we   = 2'b01;
    case (op)
      GA_XORNOTAND:   res[0] = src[0] ^ (~src[1] & src[2]);
      GA_XORROT:      res[0] = src[0] ^ ror32(src[1], int'(sh0));
      GA_ROLXOR:      res[0] = src[0] ^ rol32(src[1], int'(sh0));
      GA_XOR2:        begin res[0] = src[0] ^ src[1]; res[1] = src[2] ^ src[3]; we = 2'b11; end
      GA_XOR2IMD:     begin res[0] = src[0] ^ imm[0]; res[1] = src[1] ^ imm[1]; we = 2'b11; end
      GA_XOR3:        res[0] = src[0] ^ src[1] ^ src[2];
      GA_XOR5:        res[0] = src[0] ^ src[1] ^ src[2] ^ src[3] ^ src[4];
      GA_ROTXOR:      res[0] = src[0] ^ (src[1] >> sh0) ^ (src[2] << sh1);
      GA_ROTOR:       res[0] = ((src[0] >> sh0) & imm[2]) | ((src[1] << sh1) & imm[3]);
      GA_XORAND:      res[0] = src[0] ^ (src[1] & src[2]);
      GA_XOROR:       res[0] = src[0] ^ (src[1] | src[2]);
      GA_XOROR2:      begin res[0] = src[0] ^ src[1]; res[1] = src[2] | src[3]; we = 2'b11; end
      GA_XORAND2:     begin res[0] = src[0] ^ src[1]; res[1] = src[2] & src[3]; we = 2'b11; end
      GA_XORNOTOR:    res[0] = src[0] ^ ~(src[1] | src[2]);
      GA_NOTAND:      res[0] = ~(src[0] & src[1]);
      GA_SWAPMOVE:    begin res[0] = src[0] ^ (t_sm << shs); res[1] = src[1] ^ t_sm; we = 2'b11; end
      GA_XORSHIFTAND: res[0] = (src[0] ^ (src[1] >> src[2][4:0])) & imm[0];
      GA_SHIFTLXOR:   res[0] = src[0] ^ (src[1] << sh0);
      GA_SHIFTLOR:    res[0] = src[0] | (src[1] << sh0);
      GA_INTLV: begin
        for (int k = 0; k < 16; k++) begin
          res[0][k]    = src[0][2*k];
          res[0][16+k] = src[1][2*k];
          res[1][k]    = src[0][2*k+1];
          res[1][16+k] = src[1][2*k+1];
        end
        we = 2'b11;
      end
      GA_DEINTLV: begin
        for (int k = 0; k < 16; k++) begin
          res[0][2*k]   = src[0][k];
          res[0][2*k+1] = src[1][k];
          res[1][2*k]   = src[0][16+k];
          res[1][2*k+1] = src[1][16+k];
        end
        we = 2'b11;
      end
      GA_BSWAP:       begin res[0] = bswap(src[0]); res[1] = bswap(src[1]); we = 2'b11; end
      default:        we = 2'b00;
    endcase
  end

endmodule
