// crisax_dtcm: data tightly coupled memory with two 128-bit ports.
//
// BYTES bytes (16 KiB by default) organised as lines of DW bits (128 by default), next
// to the core for single-cycle access. Each of the two ports serves one load/store unit.
// Interface per port p: en[p] starts an access to line addr[p]; we[p][k] writes 32-bit
// word k of the line from wdata[p] at the rising edge; rdata[p] holds the line as it
// was before that edge from the next cycle on (synchronous read, read-before-write).
// If both ports write the same word in one cycle, port 1 wins. Two ports and the
// read-before-write behaviour are this implementation's choices; the size and the wide
// data bus follow the design. Contents are not reset.
module crisax_dtcm #(
  parameter int unsigned BYTES = 16384,
  parameter int unsigned DW    = 128,
  localparam int unsigned NW    = DW / 32,
  localparam int unsigned LINES = BYTES / (DW / 8),
  localparam int unsigned AW    = $clog2(LINES)
) (
  input  logic                     clk,
  input  logic [1:0]               en,
  input  logic [1:0][NW-1:0]       we,
  input  logic [1:0][AW-1:0]       addr,
  input  logic [1:0][DW-1:0]       wdata,
  output logic [1:0][DW-1:0]       rdata
);

  logic [DW-1:0] mem [LINES];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++)
      if (en[p]) begin
        rdata[p] <= mem[addr[p]];
        for (int k = 0; k < NW; k++)
          if (we[p][k]) mem[addr[p]][32*k +: 32] <= wdata[p][32*k +: 32];
      end
  end

endmodule
