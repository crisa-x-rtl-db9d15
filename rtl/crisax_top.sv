// crisax_top: CrISA-X extended execute stage with its register file, units and memory.
//
// This is the part of an extensible 32-bit processor that the CrISA-X extension adds:
// tightly coupled functional units for three classes of cryptographic instructions,
// fed from a 64-entry extended register file and issued as a three-slot VLIW bundle.
//
//   slot 0 : load/store (LSU 0)
//   slot 1 : load/store (LSU 1) or one Generic-Atomic instruction
//   slot 2 : one Generic-Atomic instruction or one Specific-Block/Specific-Procedure
//            instruction (Ascon, Keccak-f[200], Xoodoo, TinyJAMBU, GIFT, Sparkle,
//            Grain-128AEAD, PHOTON units)
//
// Timing. A bundle is issued in the cycle where bundle_valid and bundle_ready are both
// high (cycle E1). All slots read their registers in E1 and see the values from before
// the bundle. Generic-Atomic results are written at the end of E1. Loads and block /
// procedure results are written at the end of the next cycle (E2); the units keep one
// pipeline register between their two halves, so independent two-cycle instructions
// can be issued back to back. A bundle that reads or writes a register still waiting
// for its E2 result is held (bundle_ready low) for one cycle: an interlock, no
// forwarding. Stores write the data memory at the end of E1.
//
// Host side. The base core is outside this module. Its moves into and out of the
// extended registers are the host_* ports (write at the clock edge, combinational
// read); the host must not write a register that a bundle writes in the same cycle.
// busy is high while a two-cycle result is pending.
//
// The slot assignment follows the design's example format (load/store, load/store or
// XOR2, atomic instructions); placing block and procedure instructions in slot 2, the
// decoded-bundle interface and the interlock are this implementation's choices.
// Lint notes: the slot-decoding functions take the whole slot struct and use only the
// fields that matter for its kind, so unused-bit warnings on their argument stand.
module crisax_top
  import crisax_pkg::*;
#(
  parameter int unsigned DTCM_BYTES = 16384
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     bundle_valid,
  input  bundle_t  bundle,
  output logic     bundle_ready,
  input  logic     host_we,
  input  ridx_t    host_widx,
  input  word_t    host_wdata,
  input  ridx_t    host_ridx,
  output word_t    host_rdata,
  output logic     busy
);

  localparam int unsigned NRP = 23;
  localparam int unsigned NWP = 25;
  localparam int unsigned LAW = $clog2(DTCM_BYTES / 16);

  // ---------------------------------------------------------------- read set per slot
  typedef ridx_t [WIN-1:0] ridx_list_t;

  function automatic logic [WIN-1:0] slot_rd_use(slot_t s, output ridx_list_t idx);
    logic [WIN-1:0] use_mask;
    idx = '0;
    use_mask = '0;
    case (s.kind)
      SLOT_MEM: begin
        idx[0] = s.rs[0];
        use_mask[0] = (s.mop != MEM_NOP);
        for (int unsigned k = 0; k < 4; k++) begin
          idx[1+k] = s.rs[1] + ridx_t'(k);
          use_mask[1+k] = (s.mop == MEM_ST128) || (s.mop == MEM_ST32 && k == 0);
        end
      end
      SLOT_GA: begin
        for (int unsigned k = 0; k < NGASRC; k++) begin
          idx[k] = s.rs[k];
          use_mask[k] = (s.gop != GA_NOP);
        end
      end
      SLOT_BLK: begin
        for (int unsigned k = 0; k < WIN; k++) begin
          idx[k] = s.rd[0] + ridx_t'(k);
          use_mask[k] = (k < blk_width(s.bop));
        end
      end
      default: ;
    endcase
    return use_mask;
  endfunction

  function automatic logic [NREG-1:0] to_mask(ridx_list_t idx, logic [WIN-1:0] use_mask);
    logic [NREG-1:0] m;
    m = '0;
    for (int unsigned k = 0; k < WIN; k++) if (use_mask[k]) m[idx[k]] = 1'b1;
    return m;
  endfunction

  // Registers a slot writes at the end of E2 (loads, block/procedure instructions).
  function automatic logic [NREG-1:0] slot_e2_writes(slot_t s);
    logic [NREG-1:0] m;
    m = '0;
    if (s.kind == SLOT_MEM && s.mop == MEM_LD32)  m[s.rd[0]] = 1'b1;
    if (s.kind == SLOT_MEM && s.mop == MEM_LD128)
      for (int unsigned k = 0; k < 4; k++) m[s.rd[0] + ridx_t'(k)] = 1'b1;
    if (s.kind == SLOT_BLK)
      for (int unsigned k = 0; k < WIN; k++) if (k < blk_width(s.bop)) m[s.rd[0] + ridx_t'(k)] = 1'b1;
    return m;
  endfunction

  ga_op_e ga_op  [2];
  logic [1:0] ga_we [2];
  word_t [1:0] ga_res [2];

  // ---------------------------------------------------------------- hazard interlock
  ridx_list_t      ridx_s [NSLOT];
  logic [WIN-1:0]  ruse_s [NSLOT];
  logic [NREG-1:0] rmask, wmask_e1, wmask_e2, pend_q;
  logic            hazard, issue;

  always_comb begin
    rmask    = '0;
    wmask_e1 = '0;
    wmask_e2 = '0;
    for (int unsigned s = 0; s < NSLOT; s++) begin
      ruse_s[s] = slot_rd_use(bundle[s], ridx_s[s]);
      rmask    |= to_mask(ridx_s[s], ruse_s[s]);
      wmask_e2 |= slot_e2_writes(bundle[s]);
      if (bundle[s].kind == SLOT_GA && bundle[s].gop != GA_NOP) begin
        wmask_e1[bundle[s].rd[0]] = 1'b1;
        if (bundle[s].gop inside {GA_XOR2, GA_XOR2IMD, GA_XOROR2, GA_XORAND2,
                                  GA_SWAPMOVE, GA_INTLV, GA_DEINTLV, GA_BSWAP})
          wmask_e1[bundle[s].rd[1]] = 1'b1;
      end
    end
    hazard = |((rmask | wmask_e1 | wmask_e2) & pend_q);
  end

  assign bundle_ready = !hazard;
  assign issue        = bundle_valid && !hazard;

  always_ff @(posedge clk) begin
    if (!rst_n) pend_q <= '0;
    else        pend_q <= issue ? wmask_e2 : '0;
  end

  assign busy = |pend_q;

  // ---------------------------------------------------------------- register file
  ridx_t [NRP-1:0] rf_ridx;
  word_t [NRP-1:0] rf_rdata;
  logic  [NWP-1:0] rf_we;
  ridx_t [NWP-1:0] rf_widx;
  word_t [NWP-1:0] rf_wdata;

  always_comb begin
    rf_ridx[0] = host_ridx;
    for (int unsigned k = 0; k < 5; k++) begin
      rf_ridx[1+k] = ridx_s[0][k];
      rf_ridx[6+k] = ridx_s[1][k];
    end
    for (int unsigned k = 0; k < WIN; k++) rf_ridx[11+k] = ridx_s[2][k];
  end

  crisax_ext_regfile #(.NR(NREG), .NRP(NRP), .NWP(NWP)) u_rf (
    .clk, .rst_n,
    .ridx (rf_ridx), .rdata (rf_rdata),
    .we   (rf_we),   .widx  (rf_widx),  .wdata (rf_wdata)
  );

  assign host_rdata = rf_rdata[0];

  // Operands of slot s, word k.
  function automatic word_t opnd(word_t [NRP-1:0] rd, int unsigned s, int unsigned k);
    case (s)
      0:       return rd[1 + k];
      1:       return rd[6 + k];
      default: return rd[11 + k];
    endcase
  endfunction

  // ---------------------------------------------------------------- Generic-Atomic units
  for (genvar g = 0; g < 2; g++) begin : g_ga
    localparam int unsigned S = g + 1;   // GA units sit in slots 1 and 2
    word_t [NGASRC-1:0] src;
    always_comb begin
      for (int unsigned k = 0; k < NGASRC; k++) src[k] = opnd(rf_rdata, S, k);
      ga_op[g] = (issue && bundle[S].kind == SLOT_GA) ? bundle[S].gop : GA_NOP;
    end
    crisax_ga_unit u_ga (
      .op (ga_op[g]), .src (src), .imm (bundle[S].imm),
      .res (ga_res[g]), .we (ga_we[g])
    );
  end

  // ---------------------------------------------------------------- load/store units, memory
  logic [1:0]            m_en;
  logic [1:0][3:0]       m_we;
  logic [1:0][LAW-1:0]   m_addr;
  logic [1:0][127:0]     m_wdata, m_rdata;
  logic [1:0]            ld_valid, ld_wide;
  word_t [1:0][3:0]      ld_data;
  ridx_t [1:0]           ld_rd_q;

  for (genvar l = 0; l < 2; l++) begin : g_lsu
    word_t [3:0] sd;
    logic        req;
    always_comb begin
      for (int unsigned k = 0; k < 4; k++) sd[k] = opnd(rf_rdata, l, 1 + k);
      req = issue && bundle[l].kind == SLOT_MEM;
    end
    crisax_lsu #(.LAW(LAW)) u_lsu (
      .clk, .rst_n,
      .req       (req),
      .op        (bundle[l].mop),
      .addr      (opnd(rf_rdata, l, 0) + bundle[l].imm[0]),
      .sdata     (sd),
      .mem_en    (m_en[l]),
      .mem_we    (m_we[l]),
      .mem_addr  (m_addr[l]),
      .mem_wdata (m_wdata[l]),
      .mem_rdata (m_rdata[l]),
      .ld_valid  (ld_valid[l]),
      .ld_wide   (ld_wide[l]),
      .ld_data   (ld_data[l])
    );
    always_ff @(posedge clk) if (req) ld_rd_q[l] <= bundle[l].rd[0];
  end

  crisax_dtcm #(.BYTES(DTCM_BYTES), .DW(128)) u_dtcm (
    .clk, .en (m_en), .we (m_we), .addr (m_addr), .wdata (m_wdata), .rdata (m_rdata)
  );

  // ---------------------------------------------------------------- block / procedure units
  win_t    win_in;
  blk_op_e bop;
  word_t   bimm;
  unit_e   bunit;
  logic    bvalid;

  always_comb begin
    for (int unsigned k = 0; k < WIN; k++) win_in[k] = rf_rdata[11 + k];
    bop    = bundle[2].bop;
    bimm   = bundle[2].imm[0];
    bvalid = issue && bundle[2].kind == SLOT_BLK;
    bunit  = blk_unit(bop);
  end

  logic [8:1] u_v, u_ov;
  win_t [8:1] u_out;
  always_comb
    for (int unsigned u = 1; u <= 8; u++) u_v[u] = bvalid && (bunit == unit_e'(u));

  word_t [9:0]  asc_o;
  word_t [6:0]  kec_o;
  word_t [11:0] xoo_o;
  word_t [7:0]  tj_o, spk_o;
  word_t [3:0]  gift_o;
  word_t [7:0]  pho_o;
  word_t [8:0]  grn_o;

  crisax_ascon_unit u_ascon (.clk, .rst_n, .in_valid (u_v[U_ASCON]), .in_op (bop), .in_imm (bimm),
    .in_st (win_in[9:0]), .out_valid (u_ov[U_ASCON]), .out_st (asc_o));
  crisax_keccak200_unit u_keccak (.clk, .rst_n, .in_valid (u_v[U_KECCAK]), .in_op (bop), .in_imm (bimm),
    .in_st (win_in[6:0]), .out_valid (u_ov[U_KECCAK]), .out_st (kec_o));
  crisax_xoodoo_unit u_xoodoo (.clk, .rst_n, .in_valid (u_v[U_XOODOO]), .in_op (bop), .in_imm (bimm),
    .in_st (win_in[11:0]), .out_valid (u_ov[U_XOODOO]), .out_st (xoo_o));
  crisax_tinyjambu_unit u_tj (.clk, .rst_n, .in_valid (u_v[U_TJ]), .in_op (bop), .in_imm (bimm),
    .in_st (win_in[7:0]), .out_valid (u_ov[U_TJ]), .out_st (tj_o));
  crisax_gift_unit u_gift (.clk, .rst_n, .in_valid (u_v[U_GIFT]), .in_op (bop), .in_imm (bimm),
    .in_st (win_in[3:0]), .out_valid (u_ov[U_GIFT]), .out_st (gift_o));
  crisax_sparkle_unit u_sparkle (.clk, .rst_n, .in_valid (u_v[U_SPARKLE]), .in_op (bop), .in_imm (bimm),
    .in_st (win_in[7:0]), .out_valid (u_ov[U_SPARKLE]), .out_st (spk_o));
  crisax_grain_unit u_grain (.clk, .rst_n, .in_valid (u_v[U_GRAIN]), .in_op (bop), .in_imm (bimm),
    .in_st (win_in[8:0]), .out_valid (u_ov[U_GRAIN]), .out_st (grn_o));
  crisax_photon_unit u_photon (.clk, .rst_n, .in_valid (u_v[U_PHOTON]), .in_op (bop), .in_imm (bimm),
    .in_st (win_in[7:0]), .out_valid (u_ov[U_PHOTON]), .out_st (pho_o));

  always_comb begin
    u_out = '0;
    u_out[U_ASCON][9:0]   = asc_o;
    u_out[U_KECCAK][6:0]  = kec_o;
    u_out[U_XOODOO][11:0] = xoo_o;
    u_out[U_TJ][7:0]      = tj_o;
    u_out[U_GIFT][3:0]    = gift_o;
    u_out[U_SPARKLE][7:0] = spk_o;
    u_out[U_GRAIN][8:0]   = grn_o;
    u_out[U_PHOTON][7:0]  = pho_o;
  end

  // Window of the instruction in E2.
  ridx_t       bbase_q;
  int unsigned bwidth_q;
  unit_e       bunit_q;
  logic        bvalid_q;

  always_ff @(posedge clk) begin
    if (!rst_n) bvalid_q <= 1'b0;
    else        bvalid_q <= bvalid;
    if (bvalid) begin
      bbase_q  <= bundle[2].rd[0];
      bwidth_q <= blk_width(bop);
      bunit_q  <= bunit;
    end
  end

  win_t blk_res;
  always_comb blk_res = (bunit_q inside {[U_ASCON:U_PHOTON]}) ? u_out[bunit_q] : '0;

  // ---------------------------------------------------------------- write ports
  always_comb begin
    rf_we    = '0;
    rf_widx  = '0;
    rf_wdata = '0;
    // host
    rf_we[0]    = host_we;
    rf_widx[0]  = host_widx;
    rf_wdata[0] = host_wdata;
    // E1: Generic-Atomic results (ports 1..4)
    for (int unsigned g = 0; g < 2; g++)
      for (int unsigned r = 0; r < 2; r++) begin
        rf_we[1 + 2*g + r]    = ga_we[g][r] && (ga_op[g] != GA_NOP);
        rf_widx[1 + 2*g + r]  = bundle[g+1].rd[r];
        rf_wdata[1 + 2*g + r] = ga_res[g][r];
      end
    // E2: loads (ports 5..12)
    for (int unsigned l = 0; l < 2; l++)
      for (int unsigned k = 0; k < 4; k++) begin
        rf_we[5 + 4*l + k]    = ld_valid[l] && (ld_wide[l] || k == 0);
        rf_widx[5 + 4*l + k]  = ld_rd_q[l] + ridx_t'(k);
        rf_wdata[5 + 4*l + k] = ld_data[l][k];
      end
    // E2: block / procedure results (ports 13..24)
    for (int unsigned k = 0; k < WIN; k++) begin
      rf_we[13 + k]    = bvalid_q && (k < bwidth_q);
      rf_widx[13 + k]  = bbase_q + ridx_t'(k);
      rf_wdata[13 + k] = blk_res[k];
    end
  end

  // ---------------------------------------------------------------- rules of the bundle
  a_slot0_kind: assert property (@(posedge clk) disable iff (!rst_n)
      bundle_valid |-> bundle[0].kind inside {SLOT_NONE, SLOT_MEM})
    else $error("crisax_top: slot 0 carries only loads and stores");
  a_slot1_kind: assert property (@(posedge clk) disable iff (!rst_n)
      bundle_valid |-> bundle[1].kind inside {SLOT_NONE, SLOT_MEM, SLOT_GA})
    else $error("crisax_top: slot 1 carries loads, stores or atomic instructions");
  a_slot2_kind: assert property (@(posedge clk) disable iff (!rst_n)
      bundle_valid |-> bundle[2].kind inside {SLOT_NONE, SLOT_GA, SLOT_BLK})
    else $error("crisax_top: slot 2 carries atomic, block or procedure instructions");
  a_unit_done: assert property (@(posedge clk) disable iff (!rst_n)
      bvalid_q |-> u_ov[bunit_q])
    else $error("crisax_top: block unit result missing in E2");

endmodule
