// crisax_lsu: load/store unit between the extended register file and the data memory.
//
// Handles 32-bit and 128-bit loads and stores (LD32, ST32, LD128, ST128). The 128-bit
// forms move four consecutive registers in one access over the wide data bus, as the
// LOAD128B/STORE128B instructions do.
// Interface: in the issue cycle, req with op, byte address addr and store data sdata
// (sdata[0] for 32-bit stores) drive the memory port mem_* combinationally; stores are
// written at the end of that cycle. Load data comes back one cycle later: ld_valid is
// set in the following cycle with ld_data (ld_data[0] only for LD32) and ld_wide
// telling how many registers to write. Addresses are aligned by ignoring their low bits
// (2 for 32-bit, 4 for 128-bit accesses); alignment handling is this implementation's
// choice.
module crisax_lsu
  import crisax_pkg::*;
#(
  parameter int unsigned LAW = 10   // line address width of the data memory
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  input  mem_op_e           op,
  input  word_t             addr,
  input  word_t [3:0]       sdata,
  output logic              mem_en,
  output logic [3:0]        mem_we,
  output logic [LAW-1:0]    mem_addr,
  output logic [127:0]      mem_wdata,
  input  logic [127:0]      mem_rdata,
  output logic              ld_valid,
  output logic              ld_wide,
  output word_t [3:0]       ld_data
);

  logic [1:0] lane;
  assign lane     = addr[3:2];
  assign mem_addr = addr[LAW+3:4];

  always_comb begin
    mem_en    = req && (op != MEM_NOP);
    mem_we    = '0;
    mem_wdata = '0;
    case (op)
      MEM_ST32: begin
        mem_we[lane]             = req;
        mem_wdata[32*lane +: 32] = sdata[0];
      end
      MEM_ST128: begin
        mem_we    = {4{req}};
        mem_wdata = {sdata[3], sdata[2], sdata[1], sdata[0]};
      end
      default: ;
    endcase
  end

  logic       v_q, wide_q;
  logic [1:0] lane_q;

  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= req && (op == MEM_LD32 || op == MEM_LD128);
    if (req) begin
      wide_q <= (op == MEM_LD128);
      lane_q <= lane;
    end
  end

  always_comb begin
    ld_data = mem_rdata;
    if (!wide_q) begin
      ld_data      = '0;
      ld_data[0]   = mem_rdata[32*lane_q +: 32];
    end
  end

  assign ld_valid = v_q;
  assign ld_wide  = wide_q;

  logic unused_addr;
  assign unused_addr = ^{addr[31:LAW+4], addr[1:0]};

endmodule
