// crisax_ext_regfile: extended register file of the CrISA-X execute stage.
//
// NREG 32-bit registers with NRP combinational read ports and NWP write ports, so that
// all slots of a VLIW bundle, and a block or procedure instruction with up to twelve
// operands, read and write their registers in one cycle.
// Interface: ridx[k] selects the register returned on rdata[k] in the same cycle; the
// value is the one stored before this cycle's writes. A write port k with we[k] set
// stores wdata[k] into register widx[k] at the rising clock edge. Two enabled write
// ports naming the same register in one cycle is a usage error and is asserted.
// Reset (synchronous, active low) clears every register.
// The register count follows the design (64 extended registers); the port counts and
// the reset behaviour are this implementation's choices.
module crisax_ext_regfile
  import crisax_pkg::*;
#(
  parameter int unsigned NR  = 64,
  parameter int unsigned NRP = 23,
  parameter int unsigned NWP = 25,
  localparam int unsigned AW = $clog2(NR)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NRP-1:0][AW-1:0]   ridx,
  output word_t [NRP-1:0]          rdata,
  input  logic [NWP-1:0]           we,
  input  logic [NWP-1:0][AW-1:0]   widx,
  input  word_t [NWP-1:0]          wdata
);

  word_t regs [NR];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NR; i++) regs[i] <= '0;
    end else begin
      for (int k = 0; k < NWP; k++)
        if (we[k]) regs[widx[k]] <= wdata[k];
    end
  end

  always_comb
    for (int k = 0; k < NRP; k++) rdata[k] = regs[ridx[k]];

  // No two write ports may target one register in the same cycle.
  logic write_conflict;
  always_comb begin
    write_conflict = 1'b0;
    for (int a = 0; a < NWP; a++)
      for (int b = a + 1; b < NWP; b++)
        if (we[a] && we[b] && widx[a] == widx[b]) write_conflict = 1'b1;
  end

  a_no_write_conflict: assert property (@(posedge clk) disable iff (!rst_n) !write_conflict)
    else $error("ext_regfile: two write ports target one register");

endmodule
