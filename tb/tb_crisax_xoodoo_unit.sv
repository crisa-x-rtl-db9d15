// tb_crisax_xoodoo_unit: self-checking test of crisax_xoodoo_unit.
//
// Random states through XOO_THETA, XOO_RHOWEST (every round index), XOO_CHI, XOO_RHOEAST
// and XOO_PERM (12 and random round counts), compared with a plane/lane array reference.
// Checks the two-cycle timing: out_valid exactly one cycle after in_valid, for one cycle
// only, and two instructions issued back to back come out back to back.
module tb_crisax_xoodoo_unit;
  import crisax_pkg::*;
  import crisax_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           in_valid = 1'b0;
  blk_op_e        in_op = BLK_NOP;
  word_t          in_imm = '0;
  word_t [11:0] in_st = '0;
  logic           out_valid;
  word_t [11:0] out_st;

  crisax_xoodoo_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef word_t [11:0] st_t;

  function automatic st_t rand_st();
    st_t s;
    for (int i = 0; i < 12; i++) s[i] = $urandom;
    return s;
  endfunction

  function automatic st_t expect_of(blk_op_e op, word_t imm, st_t st);
    xoo_t a;
    st_t r;
    for (int y = 0; y < 3; y++) for (int x = 0; x < 4; x++) a[y][x] = st[4*y + x];
    case (op)
      XOO_THETA:   xoo_theta(a);
      XOO_RHOWEST: xoo_rhowest_iota(a, imm);
      XOO_CHI:     xoo_chi(a);
      XOO_RHOEAST: xoo_rhoeast(a);
      XOO_PERM:    xoo_perm(a, imm);
      default: ;
    endcase
    for (int y = 0; y < 3; y++) for (int x = 0; x < 4; x++) r[4*y + x] = a[y][x];
    return r;
  endfunction

  task automatic compare(string what, st_t exp);
    checks++;
    if (out_st !== exp) begin
      failures++;
      $display("FAIL %s", what);
      for (int i = 0; i < 12; i++) $display("  word %0d got %08h expected %08h", i, out_st[i], exp[i]);
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
    repeat (5) run_one(XOO_THETA, 0, rand_st());
    for (int r = 0; r < 12; r++) run_one(XOO_RHOWEST, r, rand_st());
    repeat (5) run_one(XOO_CHI, 0, rand_st());
    repeat (5) run_one(XOO_RHOEAST, 0, rand_st());
    repeat (5) run_one(XOO_PERM, 12, rand_st());
    repeat (8) run_one(XOO_PERM, 1 + $urandom_range(0, 11), rand_st());
    back_to_back(XOO_PERM, 12, XOO_CHI, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
