// tb_crisax_gift_unit: self-checking test of crisax_gift_unit.
//
// Random bit-slices through GIFT_SBOX, compared with a per-cell lookup of the GIFT S-box
// table, and through GIFT_SWAPMOVE with random masks and shifts.
// Checks the two-cycle timing: out_valid exactly one cycle after in_valid, for one cycle
// only, and two instructions issued back to back come out back to back.
module tb_crisax_gift_unit;
  import crisax_pkg::*;
  import crisax_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           in_valid = 1'b0;
  blk_op_e        in_op = BLK_NOP;
  word_t          in_imm = '0;
  word_t [3:0] in_st = '0;
  logic           out_valid;
  word_t [3:0] out_st;

  crisax_gift_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef word_t [3:0] st_t;

  function automatic st_t rand_st();
    st_t s;
    for (int i = 0; i < 4; i++) s[i] = $urandom;
    return s;
  endfunction

  function automatic st_t expect_of(blk_op_e op, word_t imm, st_t st);
    w32 s [4];
    st_t r;
    w32 t;
    int unsigned n;
    for (int i = 0; i < 4; i++) s[i] = st[i];
    r = st;
    if (op == GIFT_SBOX) begin
      gift_sbox(s);
      for (int i = 0; i < 4; i++) r[i] = s[i];
    end else if (op == GIFT_SWAPMOVE) begin
      n = st[3] % 32;
      for (int b = 0; b < 32; b++) begin
        // bit b of b-word exchanged with bit b+n of a-word where the mask is set
        if (st[2][b] && b + n < 32) begin
          r[0][b + n] = st[1][b];
          r[1][b]     = st[0][b + n];
        end
      end
    end
    return r;
  endfunction

  task automatic compare(string what, st_t exp);
    checks++;
    if (out_st !== exp) begin
      failures++;
      $display("FAIL %s", what);
      for (int i = 0; i < 4; i++) $display("  word %0d got %08h expected %08h", i, out_st[i], exp[i]);
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
    repeat (10) run_one(GIFT_SBOX, 0, rand_st());
    for (int i = 0; i < 16; i++) begin
      st_t s;
      s = rand_st();
      s[3] = $urandom_range(0, 31);
      s[2] &= 32'hffff_ffff >> s[3];  // a SWAPMOVE mask never selects bits shifted out
      run_one(GIFT_SWAPMOVE, 0, s);
    end
    back_to_back(GIFT_SBOX, 0, GIFT_SBOX, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
