// tb_crisax_dtcm: self-checking test of the dual-port data memory.
//
// Uses the full 16 KiB default. Random reads and word-masked writes on both ports are
// checked against a shadow array: read data appears in the cycle after the access and
// holds the line as it was before a write in the same cycle; writes from both ports
// land in the same cycle. Only lines that have been written are compared.
module tb_crisax_dtcm;

  localparam int unsigned BYTES = 16384, DW = 128, NW = DW / 32;
  localparam int unsigned LINES = BYTES / (DW / 8), AW = $clog2(LINES);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]           en = '0;
  logic [1:0][NW-1:0]   we = '0;
  logic [1:0][AW-1:0]   addr = '0;
  logic [1:0][DW-1:0]   wdata = '0;
  logic [1:0][DW-1:0]   rdata;

  crisax_dtcm dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] shadow [LINES];
  bit            known [LINES];

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0][DW-1:0] exp;
    logic [1:0]         cmp;
    // initialise every line through port 0 and port 1 alternately
    for (int i = 0; i < LINES; i += 2) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        en[p] = 1'b1; we[p] = '1; addr[p] = AW'(i + p);
        wdata[p] = {$urandom, $urandom, $urandom, $urandom};
        shadow[i + p] = wdata[p]; known[i + p] = 1'b1;
      end
    end
    @(negedge clk); en = '0; we = '0;
    repeat (3000) begin
      for (int p = 0; p < 2; p++) begin
        en[p]    = $urandom_range(0, 3) != 0;
        addr[p]  = AW'($urandom_range(0, 63));   // a small range so ports collide often
        we[p]    = en[p] ? NW'($urandom) : '0;
        wdata[p] = {$urandom, $urandom, $urandom, $urandom};
        exp[p]   = shadow[addr[p]];
        cmp[p]   = en[p];
      end
      if (addr[0] == addr[1]) we[0] = we[0] & ~we[1];
      @(posedge clk);
      for (int p = 0; p < 2; p++)
        if (en[p])
          for (int k = 0; k < NW; k++)
            if (we[p][k]) shadow[addr[p]][32*k +: 32] = wdata[p][32*k +: 32];
      @(negedge clk);
      for (int p = 0; p < 2; p++)
        if (cmp[p]) begin
          checks++;
          if (rdata[p] !== exp[p]) begin
            failures++;
            $display("FAIL port %0d line %0d: got %h expected %h", p, addr[p], rdata[p], exp[p]);
          end
        end
    end
    // a final read sweep of every line
    en = 2'b01; we = '0;
    for (int i = 0; i < LINES; i++) begin
      addr[0] = AW'(i);
      @(negedge clk);
      checks++;
      if (rdata[0] !== shadow[i]) begin failures++; $display("FAIL sweep line %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
