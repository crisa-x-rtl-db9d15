// tb_crisax_tinyjambu_unit: self-checking test of crisax_tinyjambu_unit.
//
// Random states and keys through TJ_ROTORBLOCK (each phase) and TJ_STATE_UPDATE (640,
// 1024 and other step counts), compared with a reference that steps the 128-bit NFSR
// one bit at a time.
// Checks the two-cycle timing: out_valid exactly one cycle after in_valid, for one cycle
// only, and two instructions issued back to back come out back to back.
module tb_crisax_tinyjambu_unit;
  import crisax_pkg::*;
  import crisax_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           in_valid = 1'b0;
  blk_op_e        in_op = BLK_NOP;
  word_t          in_imm = '0;
  word_t [7:0] in_st = '0;
  logic           out_valid;
  word_t [7:0] out_st;

  crisax_tinyjambu_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef word_t [7:0] st_t;

  function automatic st_t rand_st();
    st_t s;
    for (int i = 0; i < 8; i++) s[i] = $urandom;
    return s;
  endfunction

  function automatic st_t expect_of(blk_op_e op, word_t imm, st_t st);
    logic [127:0] s, k;
    st_t r;
    r = st;
    s = {st[3], st[2], st[1], st[0]};
    if (op == TJ_STATE_UPDATE) begin
      k = {st[7], st[6], st[5], st[4]};
      tj_steps(s, k, 128 * imm);
      {r[3], r[2], r[1], r[0]} = s;
    end else if (op == TJ_ROTORBLOCK) begin
      // 32 bit steps starting at word j: rotate word j to position 0, step, rotate back
      logic [127:0] rs, kk;
      int unsigned j;
      j  = imm % 4;
      rs = (s >> (32*j)) | (s << (128 - 32*j));
      kk = {96'h0, st[4]};
      tj_steps(rs, kk, 32);
      // after 32 steps the new word sits at the top: move it back to word j
      rs = (rs << 32) | (rs >> 96);
      rs = (rs << (32*j)) | (rs >> (128 - 32*j));
      {r[3], r[2], r[1], r[0]} = rs;
    end
    return r;
  endfunction

  task automatic compare(string what, st_t exp);
    checks++;
    if (out_st !== exp) begin
      failures++;
      $display("FAIL %s", what);
      for (int i = 0; i < 8; i++) $display("  word %0d got %08h expected %08h", i, out_st[i], exp[i]);
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
    for (int j = 0; j < 4; j++) repeat (3) run_one(TJ_ROTORBLOCK, j, rand_st());
    repeat (4) run_one(TJ_STATE_UPDATE, 5, rand_st());
    repeat (4) run_one(TJ_STATE_UPDATE, 8, rand_st());
    for (int m = 1; m <= 8; m++) run_one(TJ_STATE_UPDATE, m, rand_st());
    back_to_back(TJ_STATE_UPDATE, 8, TJ_STATE_UPDATE, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
