// crisax_pkg: types and constants shared by the CrISA-X extended execute stage.
//
// The extension adds three classes of instructions to a 32-bit host core:
//   * Generic-Atomic (GA)       - fused bitwise operations on up to five 32-bit
//                                 registers, finished in one cycle;
//   * Specific-Block (SB)       - one step of a permutation (a layer) on a window
//                                 of consecutive registers, finished in two cycles;
//   * Specific-Procedure (SP)   - a whole permutation on such a window, also split
//                                 over two cycles.
// Instructions arrive already decoded as a bundle of three slots (a VLIW word).
// The binary encoding is not fixed here; the enumerations below are the internal
// opcodes of this implementation. Register indices are 6 bits (64 extended
// registers); a block or procedure instruction names the first register of its
// window and uses up to WIN consecutive registers (wrapping modulo 64).
package crisax_pkg;

  localparam int unsigned XLEN    = 32;
  localparam int unsigned NREG    = 64;
  localparam int unsigned RAW     = 6;   // register index width
  localparam int unsigned WIN     = 12;  // largest block/procedure window
  localparam int unsigned NGASRC  = 5;   // GA source operands
  localparam int unsigned NGAIMM  = 4;   // GA immediates
  localparam int unsigned NSLOT   = 3;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RAW-1:0]  ridx_t;
  typedef word_t [WIN-1:0] win_t;

  // Generic-Atomic opcodes (semantics in crisax_ga_unit).
  typedef enum logic [4:0] {
    GA_NOP, GA_XORNOTAND, GA_XORROT, GA_ROLXOR, GA_XOR2, GA_XOR2IMD, GA_XOR3,
    GA_XOR5, GA_ROTXOR, GA_ROTOR, GA_XORAND, GA_XOROR, GA_XOROR2, GA_XORAND2,
    GA_XORNOTOR, GA_NOTAND, GA_SWAPMOVE, GA_XORSHIFTAND, GA_SHIFTLXOR,
    GA_SHIFTLOR, GA_INTLV, GA_DEINTLV, GA_BSWAP
  } ga_op_e;

  // Specific-Block and Specific-Procedure opcodes.
  typedef enum logic [5:0] {
    BLK_NOP,
    ASCON_LINEAR, ASCON_NONLINEAR, ASCON_PERM,
    KEC_THETA, KEC_RHO, KEC_PI, KEC_CHI, KEC_PERM,
    XOO_THETA, XOO_RHOWEST, XOO_CHI, XOO_RHOEAST, XOO_PERM,
    TJ_ROTORBLOCK, TJ_STATE_UPDATE,
    GIFT_SBOX, GIFT_SWAPMOVE,
    SPK_ARX, SPK_LINEAR, SPK_PERM,
    GRAIN_BLOCKROTXOR, GRAIN_KEYSTREAM,
    PHOTON_SBOX, PHOTON_SHIFTROR, PHOTON_PERM
  } blk_op_e;

  typedef enum logic [2:0] {MEM_NOP, MEM_LD32, MEM_ST32, MEM_LD128, MEM_ST128} mem_op_e;

  typedef enum logic [1:0] {SLOT_NONE, SLOT_MEM, SLOT_GA, SLOT_BLK} slot_kind_e;

  // One decoded slot. Field use by kind:
  //   MEM: rs[0] address register, imm[0] byte offset, rd[0] first load
  //        destination, rs[1] first store source (128-bit ops use 4 registers).
  //   GA : rs[0..4] sources, rd[0..1] destinations, imm[0..3] immediates.
  //   BLK: rd[0] first register of the window, imm[0] round index / count.
  typedef struct packed {
    slot_kind_e                kind;
    mem_op_e                   mop;
    ga_op_e                    gop;
    blk_op_e                   bop;
    ridx_t [1:0]               rd;
    ridx_t [NGASRC-1:0]        rs;
    word_t [NGAIMM-1:0]        imm;
  } slot_t;

  typedef slot_t [NSLOT-1:0] bundle_t;

  // Which block unit serves an opcode.
  typedef enum logic [3:0] {U_NONE, U_ASCON, U_KECCAK, U_XOODOO, U_TJ, U_GIFT, U_SPARKLE, U_GRAIN, U_PHOTON} unit_e;

  function automatic word_t ror32(word_t x, int unsigned n);
    return (x >> (n % 32)) | (x << ((32 - (n % 32)) % 32));
  endfunction

  function automatic word_t rol32(word_t x, int unsigned n);
    return (x << (n % 32)) | (x >> ((32 - (n % 32)) % 32));
  endfunction

  // Number of registers a block/procedure instruction reads and writes.
  function automatic int unsigned blk_width(blk_op_e op);
    case (op)
      ASCON_LINEAR, ASCON_NONLINEAR, ASCON_PERM:            return 10;
      KEC_THETA, KEC_RHO, KEC_PI, KEC_CHI, KEC_PERM:        return 7;
      XOO_THETA, XOO_RHOWEST, XOO_CHI, XOO_RHOEAST, XOO_PERM: return 12;
      TJ_ROTORBLOCK:                                        return 5;
      TJ_STATE_UPDATE:                                      return 8;
      GIFT_SBOX, GIFT_SWAPMOVE, PHOTON_SBOX, PHOTON_SHIFTROR: return 4;
      PHOTON_PERM:                                          return 8;
      SPK_ARX, SPK_LINEAR, SPK_PERM:                        return 8;
      GRAIN_BLOCKROTXOR:                                    return 5;
      GRAIN_KEYSTREAM:                                      return 9;
      default:                                              return 0;
    endcase
  endfunction

  function automatic unit_e blk_unit(blk_op_e op);
    case (op)
      ASCON_LINEAR, ASCON_NONLINEAR, ASCON_PERM:              return U_ASCON;
      KEC_THETA, KEC_RHO, KEC_PI, KEC_CHI, KEC_PERM:          return U_KECCAK;
      XOO_THETA, XOO_RHOWEST, XOO_CHI, XOO_RHOEAST, XOO_PERM: return U_XOODOO;
      TJ_ROTORBLOCK, TJ_STATE_UPDATE:                         return U_TJ;
      GIFT_SBOX, GIFT_SWAPMOVE:                               return U_GIFT;
      SPK_ARX, SPK_LINEAR, SPK_PERM:                          return U_SPARKLE;
      GRAIN_BLOCKROTXOR, GRAIN_KEYSTREAM:                     return U_GRAIN;
      PHOTON_SBOX, PHOTON_SHIFTROR, PHOTON_PERM:              return U_PHOTON;
      default:                                                return U_NONE;
    endcase
  endfunction

endpackage
