// tb_crisax_ext_regfile: self-checking test of the extended register file.
//
// Keeps a shadow copy of the 64 registers. Each cycle it writes random values through a
// random subset of the write ports (to distinct registers) and reads random registers
// through every read port. It checks that reads return the value from before the
// cycle's writes, that a write is visible exactly one cycle later, and that reset
// clears every register.
module tb_crisax_ext_regfile;
  import crisax_pkg::*;

  localparam int unsigned NR = 64, NRP = 23, NWP = 25, AW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NRP-1:0][AW-1:0] ridx = '0;
  word_t [NRP-1:0]        rdata;
  logic [NWP-1:0]         we = '0;
  logic [NWP-1:0][AW-1:0] widx = '0;
  word_t [NWP-1:0]        wdata = '0;

  crisax_ext_regfile #(.NR(NR), .NRP(NRP), .NWP(NWP)) dut (.*);

  int checks = 0, failures = 0;
  word_t shadow [NR];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads(string what);
    for (int k = 0; k < NRP; k++) begin
      checks++;
      if (rdata[k] !== shadow[ridx[k]]) begin
        failures++;
        $display("FAIL %s port %0d reg %0d: got %08h expected %08h", what, k, ridx[k],
                 rdata[k], shadow[ridx[k]]);
      end
    end
  endtask

  initial begin
    // fill with non-zero data, then reset and check that all registers read zero
    for (int i = 0; i < NR; i++) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NR; i += NWP) begin
      we = '0;
      for (int k = 0; k < NWP && i + k < NR; k++) begin
        we[k] = 1'b1; widx[k] = AW'(i + k); wdata[k] = $urandom | 1;
      end
      @(negedge clk);
    end
    we = '0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NR; i += NRP) begin
      for (int k = 0; k < NRP; k++) ridx[k] = AW'((i + k) % NR);
      #1 check_reads("after reset");
      @(negedge clk);
    end
    // random traffic
    repeat (500) begin
      logic [NR-1:0] used;
      used = '0;
      for (int k = 0; k < NRP; k++) ridx[k] = AW'($urandom_range(0, NR - 1));
      for (int k = 0; k < NWP; k++) begin
        int unsigned r;
        r = $urandom_range(0, NR - 1);
        we[k] = ($urandom_range(0, 2) == 0) && !used[r];
        if (we[k]) used[r] = 1'b1;
        widx[k] = AW'(r); wdata[k] = $urandom;
      end
      #1 check_reads("same-cycle read");
      @(posedge clk);
      for (int k = 0; k < NWP; k++) if (we[k]) shadow[widx[k]] = wdata[k];
      @(negedge clk);
      we = '0;
      // the written values must be visible one cycle after the write
      for (int k = 0; k < NRP; k++) ridx[k] = widx[k];
      #1 check_reads("next-cycle read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
