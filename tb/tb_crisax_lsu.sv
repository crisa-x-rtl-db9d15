// tb_crisax_lsu: self-checking test of the load/store unit.
//
// The unit is connected to a memory model written in this file (one synchronous
// 128-bit port over 1024 lines, as the data memory presents it). Random LD32, ST32,
// LD128 and ST128 requests, one per cycle, are checked against a byte-addressed shadow
// memory: stores must write exactly the addressed word or line, and load data must
// arrive with ld_valid exactly one cycle after the request, carrying ld_wide for
// 128-bit loads.
module tb_crisax_lsu;
  import crisax_pkg::*;

  localparam int unsigned LAW = 10, LINES = 1 << LAW;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          req = 1'b0;
  mem_op_e       op = MEM_NOP;
  word_t         addr = '0;
  word_t [3:0]   sdata = '0;
  logic          mem_en;
  logic [3:0]    mem_we;
  logic [LAW-1:0] mem_addr;
  logic [127:0]  mem_wdata;
  logic [127:0]  mem_rdata = '0;
  logic          ld_valid, ld_wide;
  word_t [3:0]   ld_data;

  crisax_lsu #(.LAW(LAW)) dut (.*);

  // memory model
  logic [127:0] mem [LINES];
  always @(posedge clk)
    if (mem_en) begin
      mem_rdata <= mem[mem_addr];
      for (int k = 0; k < 4; k++) if (mem_we[k]) mem[mem_addr][32*k +: 32] <= mem_wdata[32*k +: 32];
    end

  word_t shadow [LINES * 4];
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        pend, pend_wide;
    word_t [3:0] pend_exp;
    int          n_ld32 = 0, n_ld128 = 0, n_st32 = 0, n_st128 = 0;
    for (int i = 0; i < LINES; i++) begin
      mem[i] = {$urandom, $urandom, $urandom, $urandom};
      for (int k = 0; k < 4; k++) shadow[4*i + k] = mem[i][32*k +: 32];
    end
    pend = 1'b0; pend_wide = 1'b0; pend_exp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (4000) begin
      int unsigned w;
      req = $urandom_range(0, 4) != 0;
      case ($urandom_range(0, 3))
        0: op = MEM_LD32;
        1: op = MEM_ST32;
        2: op = MEM_LD128;
        default: op = MEM_ST128;
      endcase
      addr = $urandom_range(0, 255) * 4;   // a small window so loads hit recent stores
      if (op == MEM_LD128 || op == MEM_ST128) addr[3:2] = 2'b00;
      for (int k = 0; k < 4; k++) sdata[k] = $urandom;
      w = addr / 4;
      #1;
      // check the load issued in the previous cycle (after the new request settles)
      checks++;
      if (ld_valid !== pend) begin failures++; $display("FAIL ld_valid=%b expected %b", ld_valid, pend); end
      if (pend) begin
        checks++;
        if (ld_wide !== pend_wide || ld_data[0] !== pend_exp[0] ||
            (pend_wide && ld_data !== pend_exp)) begin
          failures++;
          $display("FAIL load data: got %h expected %h", ld_data, pend_exp);
        end
      end
      pend = 1'b0;
      if (req) begin
        case (op)
          MEM_LD32:  begin pend = 1'b1; pend_wide = 1'b0; pend_exp = '0; pend_exp[0] = shadow[w]; n_ld32++; end
          MEM_LD128: begin pend = 1'b1; pend_wide = 1'b1; for (int k = 0; k < 4; k++) pend_exp[k] = shadow[w + k]; n_ld128++; end
          MEM_ST32:  begin shadow[w] = sdata[0]; n_st32++; end
          MEM_ST128: begin for (int k = 0; k < 4; k++) shadow[w + k] = sdata[k]; n_st128++; end
          default: ;
        endcase
      end
      @(negedge clk);
    end
    req = 1'b0;
    @(negedge clk);
    // sweep the memory model against the shadow
    for (int i = 0; i < 64; i++)
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (mem[i][32*k +: 32] !== shadow[4*i + k]) begin failures++; $display("FAIL store line %0d word %0d", i, k); end
      end
    checks++;
    if (n_ld32 == 0 || n_ld128 == 0 || n_st32 == 0 || n_st128 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
