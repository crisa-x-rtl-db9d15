// crisax_sparkle_unit: Sparkle block and procedure instructions (Schwaemm/Esch family).
//
// State of NB branches, each branch a pair (x_i, y_i) of 32-bit words, held in the
// window as x0, y0, x1, y1, ... (2*NB registers; NB = 4 is Sparkle256).
//
// Instructions (blk_op_e):
//   SPK_ARX    imm=s : step constants (y0 ^= RCON[s % 8], y1 ^= s) followed by the
//                      Alzette ARX-box on every branch i with constant RCON[i]
//   SPK_LINEAR       : the linear layer: Feistel mixing with ell(x) = (x ^ (x<<16)) >>> 16
//                      and the branch swap with a one-branch rotation of the right half
//   SPK_PERM   imm=n : n steps (7 or 10 for Sparkle256), steps 0..n-1
// The eight Alzette constants are a hardwired table. Timing: in_valid in cycle t gives
// out_valid in cycle t+1. The ARX layer runs in the first cycle and the linear layer in
// the second; the permutation runs steps 0-4 in the first cycle and 5-9 in the second
// (at most 10 steps). The two-cycle split is this implementation's choice.
module crisax_sparkle_unit
  import crisax_pkg::*;
#(
  parameter int unsigned NB = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  blk_op_e            in_op,
  input  word_t              in_imm,
  input  word_t [2*NB-1:0]   in_st,
  output logic               out_valid,
  output word_t [2*NB-1:0]   out_st
);

  typedef word_t [2*NB-1:0] sst_t;
  localparam int unsigned HB = NB / 2;
  localparam int unsigned MAXSTEPS = 10;
  localparam word_t [7:0] RCON = {32'hC2B3293D, 32'hCFBFA1C8, 32'h4F7C7B57, 32'hBB1185EB,
                                  32'h324E7738, 32'h38B4DA56, 32'hBF715880, 32'hB7E15162};

  function automatic sst_t arx(sst_t s, int unsigned step);
    sst_t  r;
    word_t x, y, c;
    r = s;
    r[1] ^= RCON[step % 8];
    r[3] ^= word_t'(step);
    for (int unsigned i = 0; i < NB; i++) begin
      x = r[2*i]; y = r[2*i+1]; c = RCON[i % 8];
      x = x + ror32(y, 31); y ^= ror32(x, 24); x ^= c;
      x = x + ror32(y, 17); y ^= ror32(x, 17); x ^= c;
      x = x + y;            y ^= ror32(x, 31); x ^= c;
      x = x + ror32(y, 24); y ^= ror32(x, 16); x ^= c;
      r[2*i] = x; r[2*i+1] = y;
    end
    return r;
  endfunction

  function automatic word_t ell(word_t v);
    return ror32(v ^ (v << 16), 16);
  endfunction

  function automatic sst_t linear(sst_t s);
    word_t [NB-1:0] x, y, nx, ny;
    word_t tx, ty;
    sst_t r;
    for (int unsigned i = 0; i < NB; i++) begin x[i] = s[2*i]; y[i] = s[2*i+1]; end
    tx = '0; ty = '0;
    for (int unsigned i = 0; i < HB; i++) begin tx ^= x[i]; ty ^= y[i]; end
    tx = ell(tx); ty = ell(ty);
    for (int unsigned i = 0; i < HB; i++) begin
      y[i+HB] ^= tx ^ y[i];
      x[i+HB] ^= ty ^ x[i];
    end
    // new left branch i = old right branch HB+((i+1) % HB); new right branch = old left
    for (int unsigned i = 0; i < HB; i++) begin
      nx[i]    = x[HB + (i+1) % HB];
      ny[i]    = y[HB + (i+1) % HB];
      nx[i+HB] = x[i];
      ny[i+HB] = y[i];
    end
    for (int unsigned i = 0; i < NB; i++) begin r[2*i] = nx[i]; r[2*i+1] = ny[i]; end
    return r;
  endfunction

  function automatic sst_t steps(sst_t s, int unsigned n, int unsigned lo, int unsigned hi);
    sst_t r;
    r = s;
    for (int unsigned k = lo; k <= hi; k++)
      if (k < n) r = linear(arx(r, k));
    return r;
  endfunction

  function automatic int unsigned ns(word_t imm);
    return (imm > MAXSTEPS) ? MAXSTEPS : int'(imm);
  endfunction

  sst_t s1;
  always_comb begin
    case (in_op)
      SPK_ARX:  s1 = arx(in_st, int'(in_imm[7:0]));
      SPK_PERM: s1 = steps(in_st, ns(in_imm), 0, MAXSTEPS/2 - 1);
      default:  s1 = in_st;
    endcase
  end

  logic    v_q;
  blk_op_e op_q;
  word_t   imm_q;
  sst_t    s_q;

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
      SPK_LINEAR: out_st = linear(s_q);
      SPK_PERM:   out_st = steps(s_q, ns(imm_q), MAXSTEPS/2, MAXSTEPS - 1);
      default:    out_st = s_q;
    endcase
  end

  assign out_valid = v_q;

endmodule
