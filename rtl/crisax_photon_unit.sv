// crisax_photon_unit: PHOTON-256 block and procedure instructions (PHOTON-Beetle).
//
// The 256-bit PHOTON state is an 8 x 8 array of 4-bit cells X[row][col]. It is held
// bitsliced in two groups of four registers: group g holds rows 4g..4g+3, and bit j of
// cell X[4g+r][col] is bit 8r+col of register 4g+j. One group is the operand of the
// block instructions, both groups (eight registers) the operand of the procedure.
//
// Instructions (blk_op_e):
//   PHOTON_SBOX          : the 4-bit PHOTON (PRESENT) S-box
//                          {C,5,6,B,9,0,A,D,3,E,F,8,4,7,1,2} on all 32 cells of a group
//   PHOTON_SHIFTROR imm=g: ShiftRows on group g: row i = 4g+r is rotated left by i
//                          cells (X'[i][c] = X[i][(c+i) mod 8]), 16 bytes at once
//   PHOTON_PERM     imm=n: the last n of the 12 rounds of PHOTON-256 on all 8 registers.
//                          Round k: AddConstant (X[i][0] ^= RC[k] ^ IC[i]), SubCells,
//                          ShiftRows, MixColumnSerial (eight steps of the serial
//                          matrix with last row 2,4,2,11,2,8,5,6 over GF(2^4) modulo
//                          x^4+x+1 on every column).
// Timing: in_valid in cycle t gives out_valid in cycle t+1. The blocks are computed in
// the first cycle; the procedure runs rounds 0-5 in the first cycle and 6-11 in the
// second. The two register groups, the S-box block over 32 cells and the 8-register
// procedure follow the design's description; the bit layout within a group, the group
// select by immediate and the split are this implementation's choices. Words 4-7 pass
// through the block instructions.
module crisax_photon_unit
  import crisax_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  blk_op_e       in_op,
  input  word_t         in_imm,
  input  word_t [7:0]   in_st,
  output logic          out_valid,
  output word_t [7:0]   out_st
);

  typedef word_t [7:0] pst_t;
  typedef logic [7:0][7:0][3:0] cells_t;   // [row][col]

  localparam logic [15:0][3:0] SBOX = {4'h2, 4'h1, 4'h7, 4'h4, 4'h8, 4'hF, 4'hE, 4'h3,
                                       4'hD, 4'hA, 4'h0, 4'h9, 4'hB, 4'h6, 4'h5, 4'hC};
  localparam logic [11:0][3:0] RC  = {4'hA, 4'h5, 4'h2, 4'h9, 4'hC, 4'h6,
                                      4'hB, 4'hD, 4'hE, 4'h7, 4'h3, 4'h1};
  localparam logic [7:0][3:0]  IC  = {4'h8, 4'hC, 4'hE, 4'hF, 4'h7, 4'h3, 4'h1, 4'h0};
  localparam logic [7:0][3:0]  Z   = {4'h6, 4'h5, 4'h8, 4'h2, 4'hB, 4'h2, 4'h4, 4'h2};

  function automatic logic [3:0] sb(logic [3:0] n);
    return SBOX[n];
  endfunction

  function automatic pst_t sbox_group(pst_t s);
    pst_t       r;
    logic [3:0] o;
    r = s;
    for (int i = 0; i < 32; i++) begin
      o = sb({s[3][i], s[2][i], s[1][i], s[0][i]});
      for (int j = 0; j < 4; j++) r[j][i] = o[j];
    end
    return r;
  endfunction

  function automatic pst_t shiftrows_group(pst_t s, logic g);
    pst_t r;
    int unsigned i;
    r = s;
    for (int j = 0; j < 4; j++)
      for (int rr = 0; rr < 4; rr++) begin
        i = 4 * int'(g) + rr;
        for (int c = 0; c < 8; c++) r[j][8*rr + c] = s[j][8*rr + (c + i) % 8];
      end
    return r;
  endfunction

  function automatic cells_t unpack(pst_t s);
    cells_t x;
    for (int i = 0; i < 8; i++)
      for (int c = 0; c < 8; c++)
        for (int j = 0; j < 4; j++) x[i][c][j] = s[4*(i/4) + j][8*(i%4) + c];
    return x;
  endfunction

  function automatic pst_t pack(cells_t x);
    pst_t s;
    for (int i = 0; i < 8; i++)
      for (int c = 0; c < 8; c++)
        for (int j = 0; j < 4; j++) s[4*(i/4) + j][8*(i%4) + c] = x[i][c][j];
    return s;
  endfunction

  // Multiplication in GF(2^4) modulo x^4 + x + 1.
  function automatic logic [3:0] xtime(logic [3:0] a);
    return {a[2:0], 1'b0} ^ {2'b00, a[3], a[3]};
  endfunction

  function automatic logic [3:0] gmul(logic [3:0] a, logic [3:0] b);
    logic [3:0] a2, a4, a8;
    a2 = xtime(a);
    a4 = xtime(a2);
    a8 = xtime(a4);
    return ({4{b[0]}} & a) ^ ({4{b[1]}} & a2) ^ ({4{b[2]}} & a4) ^ ({4{b[3]}} & a8);
  endfunction

  function automatic cells_t round_fn(cells_t x, int unsigned k);
    cells_t y, z;
    logic [7:0][3:0] col;
    logic [3:0] acc;
    for (int i = 0; i < 8; i++) x[i][0] ^= RC[k] ^ IC[i];
    for (int i = 0; i < 8; i++)
      for (int c = 0; c < 8; c++) y[i][c] = sb(x[i][c]);
    for (int i = 0; i < 8; i++)
      for (int c = 0; c < 8; c++) z[i][c] = y[i][(c + i) % 8];
    for (int c = 0; c < 8; c++) begin
      for (int i = 0; i < 8; i++) col[i] = z[i][c];
      for (int step = 0; step < 8; step++) begin
        acc = '0;
        for (int m = 0; m < 8; m++) acc ^= gmul(Z[m], col[m]);
        for (int m = 0; m < 7; m++) col[m] = col[m+1];
        col[7] = acc;
      end
      for (int i = 0; i < 8; i++) z[i][c] = col[i];
    end
    return z;
  endfunction

  function automatic int unsigned nr(word_t imm);
    return (imm > 12) ? 12 : int'(imm);
  endfunction

  // Round chains: rounds 0-5 from the input, rounds 6-11 from the pipeline register.
  // Round k is applied when it is among the last n rounds (k + n >= 12).
  int unsigned n1, n2;
  assign n1 = nr(in_imm);

  for (genvar k = 0; k < 6; k++) begin : g_r1
    cells_t c_in, c_out;
    if (k == 0) begin : g_first
      assign c_in = unpack(in_st);
    end else begin : g_next
      assign c_in = g_r1[k-1].c_out;
    end
    assign c_out = (k + n1 >= 12) ? round_fn(c_in, k) : c_in;
  end

  pst_t s1;
  always_comb begin
    case (in_op)
      PHOTON_SBOX:     s1 = sbox_group(in_st);
      PHOTON_SHIFTROR: s1 = shiftrows_group(in_st, in_imm[0]);
      PHOTON_PERM:     s1 = pack(g_r1[5].c_out);
      default:         s1 = in_st;
    endcase
  end

  logic    v_q;
  blk_op_e op_q;
  word_t   imm_q;
  pst_t    s_q;

  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
    if (in_valid) begin
      op_q  <= in_op;
      imm_q <= in_imm;
      s_q   <= s1;
    end
  end

  assign n2 = nr(imm_q);

  for (genvar k = 0; k < 6; k++) begin : g_r2
    cells_t c_in, c_out;
    if (k == 0) begin : g_first
      assign c_in = unpack(s_q);
    end else begin : g_next
      assign c_in = g_r2[k-1].c_out;
    end
    assign c_out = (k + 6 + n2 >= 12) ? round_fn(c_in, k + 6) : c_in;
  end

  assign out_valid = v_q;
  assign out_st    = (op_q == PHOTON_PERM) ? pack(g_r2[5].c_out) : s_q;

endmodule
