// tb_crisax_grain_unit: self-checking test of crisax_grain_unit.
//
// Random LFSR/NFSR states through GRAIN_KEYSTREAM, compared with a reference that clocks
// the two 128-bit registers one bit at a time, and GRAIN_BLOCKROTXOR against the four
// word extractions written out bit by bit.
// Checks the two-cycle timing: out_valid exactly one cycle after in_valid, for one cycle
// only, and two instructions issued back to back come out back to back.
module tb_crisax_grain_unit;
  import crisax_pkg::*;
  import crisax_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           in_valid = 1'b0;
  blk_op_e        in_op = BLK_NOP;
  word_t          in_imm = '0;
  word_t [8:0] in_st = '0;
  logic           out_valid;
  word_t [8:0] out_st;

  crisax_grain_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef word_t [8:0] st_t;

  function automatic st_t rand_st();
    st_t s;
    for (int i = 0; i < 9; i++) s[i] = $urandom;
    return s;
  endfunction

  function automatic st_t expect_of(blk_op_e op, word_t imm, st_t st);
    logic lf [128];
    logic nf [128];
    w32 z;
    st_t r;
    logic [127:0] s;
    r = st;
    if (op == GRAIN_KEYSTREAM) begin
      for (int i = 0; i < 128; i++) begin lf[i] = st[i/32][i%32]; nf[i] = st[4 + i/32][i%32]; end
      grain_word(lf, nf, z);
      for (int i = 0; i < 128; i++) begin r[i/32][i%32] = lf[i]; r[4 + i/32][i%32] = nf[i]; end
      r[8] = z;
    end else if (op == GRAIN_BLOCKROTXOR) begin
      // x ^= bits [25+32*i +: 32] of the 64-bit pairs as printed (s0<<7)^(s1>>25) etc.
      logic [63:0] p01, p12, p23;
      p01 = {st[0], st[1]};
      p12 = {st[1], st[2]};
      p23 = {st[2], st[3]};
      r[4] = st[4] ^ p01[56:25] ^ p12[57:26] ^ p23[57:26] ^ p23[46:15];
    end
    return r;
  endfunction

  task automatic compare(string what, st_t exp);
    checks++;
    if (out_st !== exp) begin
      failures++;
      $display("FAIL %s", what);
      for (int i = 0; i < 9; i++) $display("  word %0d got %08h expected %08h", i, out_st[i], exp[i]);
    end
  endtask

  task automatic run_one(blk_op_e op, word_t imm, st_t st);
    st_t exp;
    exp = expect_of(op, imm, st);
    @(negedge clk);
    in_valid = 1'b1; in_op = op; in_imm = imm; in_st = st;
    @(negedge clk);
    in_valid = 1'b0; in_op = BLK_NOP; in_st = '0;
    checks++;
    if (out_valid !== 1'b1) begin failures++; $display("FAIL: no result one cycle after issue"); end
    compare($sformatf("%s imm=%0d", op.name(), imm), exp);
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL: result valid for more than one cycle"); end
  endtask

  task automatic back_to_back(blk_op_e op_a, word_t imm_a, blk_op_e op_b, word_t imm_b);
    st_t a, b, ea, eb;
    a = rand_st(); b = rand_st();
    ea = expect_of(op_a, imm_a, a);
    eb = expect_of(op_b, imm_b, b);
    @(negedge clk); in_valid = 1'b1; in_op = op_a; in_imm = imm_a; in_st = a;
    @(negedge clk); in_op = op_b; in_imm = imm_b; in_st = b;
    checks++; if (out_valid !== 1'b1) failures++;
    compare("back-to-back first", ea);
    @(negedge clk); in_valid = 1'b0; in_op = BLK_NOP;
    checks++; if (out_valid !== 1'b1) failures++;
    compare("back-to-back second", eb);
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) run_one(GRAIN_KEYSTREAM, 0, rand_st());
    repeat (10) run_one(GRAIN_BLOCKROTXOR, 0, rand_st());
    back_to_back(GRAIN_KEYSTREAM, 0, GRAIN_KEYSTREAM, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
