// tb_crisax_photon_unit: self-checking test of crisax_photon_unit.
//
// Random bit-planes through PHOTON_SBOX (per-cell lookup of the S-box table), PHOTON_SHIFTROR
// on each register group (cell-by-cell rotation), and PHOTON_PERM (12 and random round
// counts) against a cell-array reference that uses the precomputed MixColumn matrix.
// Checks the two-cycle timing: out_valid exactly one cycle after in_valid, for one cycle
// only, and two instructions issued back to back come out back to back.
module tb_crisax_photon_unit;
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

  crisax_photon_unit dut (.*);

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
    w32 s [4];
    w32 f [8];
    st_t r;
    r = st;
    for (int i = 0; i < 4; i++) s[i] = st[i];
    for (int i = 0; i < 8; i++) f[i] = st[i];
    case (op)
      PHOTON_SBOX: begin
        photon_sbox(s);
        for (int i = 0; i < 4; i++) r[i] = s[i];
      end
      PHOTON_SHIFTROR:
        // cell (row 4g+rr, column c) takes the cell of column (c + row) mod 8
        for (int j = 0; j < 4; j++)
          for (int rr = 0; rr < 4; rr++)
            for (int c = 0; c < 8; c++)
              r[j][8*rr + c] = st[j][8*rr + (c + 4*imm[0] + rr) % 8];
      PHOTON_PERM: begin
        photon_perm(f, imm);
        for (int i = 0; i < 8; i++) r[i] = f[i];
      end
      default: ;
    endcase
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
    repeat (10) run_one(PHOTON_SBOX, 0, rand_st());
    run_one(PHOTON_SBOX, 0, '0);
    for (int g = 0; g < 2; g++) repeat (4) run_one(PHOTON_SHIFTROR, g, rand_st());
    run_one(PHOTON_PERM, 12, '0);
    repeat (5) run_one(PHOTON_PERM, 12, rand_st());
    for (int n = 1; n <= 12; n++) run_one(PHOTON_PERM, n, rand_st());
    back_to_back(PHOTON_PERM, 12, PHOTON_SBOX, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
