// tb_crisax_ascon_unit: self-checking test of the Ascon block/procedure unit.
//
// Drives random bit-interleaved states through ASCON_NONLINEAR (every round index),
// ASCON_LINEAR and ASCON_PERM (6, 8, 12 and random round counts) and compares with a
// reference that works on the interleaved words directly. Checks the two-cycle timing:
// out_valid exactly one cycle after in_valid, and two instructions issued back to back
// come out back to back.
module tb_crisax_ascon_unit;
  import crisax_pkg::*;
  import crisax_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0;
  blk_op_e     in_op = BLK_NOP;
  word_t       in_imm = '0;
  word_t [9:0] in_st = '0;
  logic        out_valid;
  word_t [9:0] out_st;

  crisax_ascon_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic asc_t to_ref(word_t [9:0] w);
    asc_t s;
    for (int i = 0; i < 10; i++) s[i] = w[i];
    return s;
  endfunction

  function automatic asc_t expect_of(blk_op_e op, word_t imm, word_t [9:0] w);
    asc_t s;
    s = to_ref(w);
    case (op)
      ASCON_NONLINEAR: ascon_sbox(s, imm);
      ASCON_LINEAR:    ascon_linear(s);
      ASCON_PERM:      ascon_perm(s, imm);
      default: ;
    endcase
    return s;
  endfunction

  task automatic compare(string what, asc_t exp);
    checks++;
    for (int i = 0; i < 10; i++)
      if (out_st[i] !== exp[i]) begin
        failures++;
        $display("FAIL %s word %0d: got %08h expected %08h", what, i, out_st[i], exp[i]);
        break;
      end
  endtask

  task automatic run_one(blk_op_e op, word_t imm);
    word_t [9:0] st;
    asc_t exp;
    for (int i = 0; i < 10; i++) st[i] = $urandom;
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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 12; r++) run_one(ASCON_NONLINEAR, r);
    repeat (10) run_one(ASCON_LINEAR, 0);
    run_one(ASCON_PERM, 6);
    run_one(ASCON_PERM, 8);
    run_one(ASCON_PERM, 12);
    repeat (10) run_one(ASCON_PERM, 1 + $urandom_range(0, 11));
    // back-to-back issue: a p12 and a p6 in consecutive cycles
    begin
      word_t [9:0] a, b;
      asc_t ea, eb;
      for (int i = 0; i < 10; i++) begin a[i] = $urandom; b[i] = $urandom; end
      ea = expect_of(ASCON_PERM, 12, a);
      eb = expect_of(ASCON_PERM, 6, b);
      @(negedge clk); in_valid = 1'b1; in_op = ASCON_PERM; in_imm = 12; in_st = a;
      @(negedge clk); in_imm = 6; in_st = b;
      checks++; if (out_valid !== 1'b1) failures++;
      compare("back-to-back first", ea);
      @(negedge clk); in_valid = 1'b0;
      checks++; if (out_valid !== 1'b1) failures++;
      compare("back-to-back second", eb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
