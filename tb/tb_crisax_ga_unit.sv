// tb_crisax_ga_unit: self-checking test of the Generic-Atomic unit.
//
// Applies every GA instruction with random operands and immediates and compares both
// results and the write enables with a bit-by-bit reference written in this file
// (rotations and shifts are built from single-bit moves, not from the shift operators
// the unit uses). The unit is combinational, so the check is made in the same cycle:
// the single-cycle latency of GA instructions is checked by sampling the result one
// clock after the operands are applied, with nothing held in between.
module tb_crisax_ga_unit;
  import crisax_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  ga_op_e             op = GA_NOP;
  word_t [NGASRC-1:0] src = '0;
  word_t [NGAIMM-1:0] imm = '0;
  word_t [1:0]        res;
  logic  [1:0]        we;

  crisax_ga_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t shr(word_t x, int unsigned n);
    word_t y = '0;
    for (int b = 0; b < 32; b++) if (b + n < 32) y[b] = x[b + n];
    return y;
  endfunction

  function automatic word_t shl(word_t x, int unsigned n);
    word_t y = '0;
    for (int b = 0; b < 32; b++) if (b >= n) y[b] = x[b - n];
    return y;
  endfunction

  function automatic word_t rotr(word_t x, int unsigned n);
    word_t y;
    for (int b = 0; b < 32; b++) y[b] = x[(b + n) % 32];
    return y;
  endfunction

  task automatic expect_of(ga_op_e o, word_t [NGASRC-1:0] s, word_t [NGAIMM-1:0] i,
                           output word_t [1:0] r, output logic [1:0] w);
    int unsigned n0, n1, ns;
    word_t t;
    n0 = i[0] % 32; n1 = i[1] % 32; ns = s[3] % 32;
    r = '0; w = 2'b01;
    case (o)
      GA_XORNOTAND:   r[0] = s[0] ^ (~s[1] & s[2]);
      GA_XORROT:      r[0] = s[0] ^ rotr(s[1], n0);
      GA_ROLXOR:      r[0] = s[0] ^ rotr(s[1], (32 - n0) % 32);
      GA_XOR2:        begin r[0] = s[0] ^ s[1]; r[1] = s[2] ^ s[3]; w = 2'b11; end
      GA_XOR2IMD:     begin r[0] = s[0] ^ i[0]; r[1] = s[1] ^ i[1]; w = 2'b11; end
      GA_XOR3:        r[0] = s[0] ^ s[1] ^ s[2];
      GA_XOR5:        r[0] = s[0] ^ s[1] ^ s[2] ^ s[3] ^ s[4];
      GA_ROTXOR:      r[0] = s[0] ^ shr(s[1], n0) ^ shl(s[2], n1);
      GA_ROTOR:       r[0] = (shr(s[0], n0) & i[2]) | (shl(s[1], n1) & i[3]);
      GA_XORAND:      r[0] = s[0] ^ (s[1] & s[2]);
      GA_XOROR:       r[0] = s[0] ^ (s[1] | s[2]);
      GA_XOROR2:      begin r[0] = s[0] ^ s[1]; r[1] = s[2] | s[3]; w = 2'b11; end
      GA_XORAND2:     begin r[0] = s[0] ^ s[1]; r[1] = s[2] & s[3]; w = 2'b11; end
      GA_XORNOTOR:    r[0] = ~(s[0] ^ (s[1] | s[2]));
      GA_NOTAND:      r[0] = ~(s[0] & s[1]);
      GA_SWAPMOVE: begin
        // exchange bit b of s1 with bit b+n of s0 wherever the mask bit b is set
        r[0] = s[0]; r[1] = s[1];
        for (int b = 0; b < 32; b++)
          if (s[2][b]) begin
            t[0] = s[1][b] ^ ((b + ns < 32) ? s[0][b + ns] : 1'b0);
            r[1][b] = s[1][b] ^ t[0];
            if (b + ns < 32) r[0][b + ns] = s[0][b + ns] ^ t[0];
          end
        w = 2'b11;
      end
      GA_XORSHIFTAND: r[0] = (s[0] ^ shr(s[1], s[2] % 32)) & i[0];
      GA_SHIFTLXOR:   r[0] = s[0] ^ shl(s[1], n0);
      GA_SHIFTLOR:    r[0] = s[0] | shl(s[1], n0);
      GA_INTLV: begin
        logic [63:0] x;
        x = {s[1], s[0]};
        for (int k = 0; k < 32; k++) begin r[0][k] = x[2*k]; r[1][k] = x[2*k+1]; end
        w = 2'b11;
      end
      GA_DEINTLV: begin
        logic [63:0] x;
        for (int k = 0; k < 32; k++) begin x[2*k] = s[0][k]; x[2*k+1] = s[1][k]; end
        r[0] = x[31:0]; r[1] = x[63:32];
        w = 2'b11;
      end
      GA_BSWAP: begin
        for (int k = 0; k < 4; k++) begin
          r[0][8*k +: 8] = s[0][8*(3-k) +: 8];
          r[1][8*k +: 8] = s[1][8*(3-k) +: 8];
        end
        w = 2'b11;
      end
      default: w = 2'b00;
    endcase
  endtask

  initial begin
    ga_op_e o;
    word_t [1:0] er;
    logic  [1:0] ew;
    repeat (2) @(negedge clk);
    o = o.first();
    forever begin
      for (int n = 0; n < 40; n++) begin
        for (int k = 0; k < NGASRC; k++) src[k] = $urandom;
        for (int k = 0; k < NGAIMM; k++) imm[k] = $urandom;
        if (o == GA_SWAPMOVE && n % 2 == 0) src[2] = shr(src[2], src[3] % 32);
        op = o;
        expect_of(o, src, imm, er, ew);
        @(negedge clk);
        checks++;
        if (we !== ew || (ew[0] && res[0] !== er[0]) || (ew[1] && res[1] !== er[1])) begin
          failures++;
          $display("FAIL %s: got we=%b %08h %08h expected we=%b %08h %08h",
                   o.name(), we, res[0], res[1], ew, er[0], er[1]);
        end
      end
      if (o == o.last()) break;
      o = o.next();
    end
    // XOR2IMD applied to a register and its own result, cycle after cycle, as a chain
    // of dependent single-cycle instructions
    begin
      word_t acc, accx;
      acc = $urandom; accx = acc;
      op = GA_XOR2IMD;
      for (int n = 0; n < 8; n++) begin
        src[0] = acc; imm[0] = n * 32'h0101_0101;
        @(negedge clk);
        acc = res[0];
        accx ^= n * 32'h0101_0101;
      end
      checks++;
      if (acc !== accx) begin failures++; $display("FAIL chain"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
