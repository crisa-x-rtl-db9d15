// tb_crisax_top: end-to-end test of the CrISA-X execute stage at its default size.
//
// Plays the role of the base core: it loads state into the extended registers through
// the host port, issues decoded three-slot bundles, and reads the registers back. A
// shadow copy of the 64 registers is updated with the reference models for every
// bundle, and the whole register file is compared at the end of each phase.
// The program exercises, and counts:
//   - every block/procedure unit once or more (Ascon p12, Keccak-f[200], Xoodoo,
//     TinyJAMBU, GIFT, Sparkle, Grain, PHOTON S-box and permutation), compared with the
//     reference models;
//   - the two-cycle timing: a block result is not visible one cycle after issue and is
//     visible two cycles after, with busy high in between;
//   - back-to-back issue of two independent two-cycle instructions;
//   - the interlock: a bundle that reads a pending result is held exactly one cycle;
//   - single-cycle Generic-Atomic results used by the very next bundle without a stall;
//   - 32-bit and 128-bit loads and stores through both load/store slots;
//   - full bundles with all three slots busy.
// A mechanism that never happens counts as a failure. Runs with no parameter override.
module tb_crisax_top;
  import crisax_pkg::*;
  import crisax_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    bundle_valid = 1'b0;
  bundle_t bundle = '0;
  logic    bundle_ready;
  logic    host_we = 1'b0;
  ridx_t   host_widx = '0;
  word_t   host_wdata = '0;
  ridx_t   host_ridx = '0;
  word_t   host_rdata;
  logic    busy;

  crisax_top dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_stall = 0, n_two_cycle = 0, n_back_to_back = 0, n_ga_single = 0;
  int n_load = 0, n_store = 0, n_full_bundle = 0, n_units = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t rf [64];
  word_t mem [4096];   // shadow of the 16 KiB data memory, 32-bit words

  // ------------------------------------------------------------ bundle construction
  function automatic slot_t s_none();
    return '0;
  endfunction

  function automatic slot_t s_blk(blk_op_e op, int unsigned base, int unsigned imm);
    slot_t s = '0;
    s.kind = SLOT_BLK; s.bop = op; s.rd[0] = ridx_t'(base); s.imm[0] = imm;
    return s;
  endfunction

  function automatic slot_t s_ga(ga_op_e op, int unsigned rd0, int unsigned rd1,
                                 int unsigned r0, int unsigned r1, int unsigned r2,
                                 int unsigned r3, int unsigned r4,
                                 word_t i0 = 0, word_t i1 = 0, word_t i2 = 0, word_t i3 = 0);
    slot_t s = '0;
    s.kind = SLOT_GA; s.gop = op;
    s.rd[0] = ridx_t'(rd0); s.rd[1] = ridx_t'(rd1);
    s.rs[0] = ridx_t'(r0); s.rs[1] = ridx_t'(r1); s.rs[2] = ridx_t'(r2);
    s.rs[3] = ridx_t'(r3); s.rs[4] = ridx_t'(r4);
    s.imm[0] = i0; s.imm[1] = i1; s.imm[2] = i2; s.imm[3] = i3;
    return s;
  endfunction

  function automatic slot_t s_mem(mem_op_e op, int unsigned rd, int unsigned base,
                                  int unsigned src, word_t off);
    slot_t s = '0;
    s.kind = SLOT_MEM; s.mop = op; s.rd[0] = ridx_t'(rd);
    s.rs[0] = ridx_t'(base); s.rs[1] = ridx_t'(src); s.imm[0] = off;
    return s;
  endfunction

  // ------------------------------------------------------------ host port
  task automatic host_write(int unsigned r, word_t v);
    @(negedge clk);
    host_we = 1'b1; host_widx = ridx_t'(r); host_wdata = v;
    rf[r] = v;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic host_read(int unsigned r, output word_t v);
    host_ridx = ridx_t'(r);
    #1;
    v = host_rdata;
  endtask

  task automatic compare_rf(string phase);
    @(negedge clk);
    for (int r = 0; r < 64; r++) begin
      host_ridx = ridx_t'(r);
      #1;
      checks++;
      if (host_rdata !== rf[r]) begin
        failures++;
        $display("FAIL %s: r%0d = %08h expected %08h", phase, r, host_rdata, rf[r]);
      end
    end
  endtask

  // ------------------------------------------------------------ issue
  // Presents the bundle from a falling edge until it is accepted; returns the cycle
  // number of the accepting clock edge and the number of cycles it was held.
  task automatic issue(bundle_t b, output int unsigned at, output int held);
    @(negedge clk);
    bundle_valid = 1'b1; bundle = b;
    held = 0;
    #1;
    while (!bundle_ready) begin
      held++;
      @(negedge clk);
      #1;
    end
    at = cyc;
    @(posedge clk);
    #1;
    bundle_valid = 1'b0; bundle = '0;
    model(b);
    if (b[0].kind != SLOT_NONE && b[1].kind != SLOT_NONE && b[2].kind != SLOT_NONE) n_full_bundle++;
  endtask

  // ------------------------------------------------------------ reference update
  function automatic void model_ga(slot_t s, ref word_t upd [64], ref bit updm [64]);
    word_t a [5];
    word_t r0, r1;
    bit    two;
    for (int k = 0; k < 5; k++) a[k] = rf[s.rs[k]];
    two = 1'b0; r1 = '0;
    case (s.gop)
      GA_XOR3:      r0 = a[0] ^ a[1] ^ a[2];
      GA_XORROT:    r0 = a[0] ^ ror(a[1], s.imm[0] % 32);
      GA_XORNOTAND: r0 = a[0] ^ (~a[1] & a[2]);
      GA_XOR5:      r0 = a[0] ^ a[1] ^ a[2] ^ a[3] ^ a[4];
      GA_XOR2:      begin r0 = a[0] ^ a[1]; r1 = a[2] ^ a[3]; two = 1'b1; end
      GA_XORAND:    r0 = a[0] ^ (a[1] & a[2]);
      default: begin r0 = '0; $display("TB: GA op %s not modelled", s.gop.name()); failures++; end
    endcase
    upd[s.rd[0]] = r0; updm[s.rd[0]] = 1'b1;
    if (two) begin upd[s.rd[1]] = r1; updm[s.rd[1]] = 1'b1; end
  endfunction

  function automatic void model_blk(slot_t s, ref word_t upd [64], ref bit updm [64]);
    int unsigned b;
    b = s.rd[0];
    case (s.bop)
      ASCON_PERM: begin
        asc_t a;
        for (int i = 0; i < 10; i++) a[i] = rf[b + i];
        ascon_perm(a, s.imm[0]);
        for (int i = 0; i < 10; i++) begin upd[b + i] = a[i]; updm[b + i] = 1'b1; end
      end
      KEC_PERM: begin
        w32 w [7];
        kec_t a;
        for (int i = 0; i < 7; i++) w[i] = rf[b + i];
        a = kec_from(w);
        kec_perm(a, s.imm[0]);
        kec_to(a, w);
        for (int i = 0; i < 7; i++) begin upd[b + i] = w[i]; updm[b + i] = 1'b1; end
      end
      XOO_PERM: begin
        xoo_t a;
        for (int y = 0; y < 3; y++) for (int x = 0; x < 4; x++) a[y][x] = rf[b + 4*y + x];
        xoo_perm(a, s.imm[0]);
        for (int y = 0; y < 3; y++) for (int x = 0; x < 4; x++) begin
          upd[b + 4*y + x] = a[y][x]; updm[b + 4*y + x] = 1'b1;
        end
      end
      TJ_STATE_UPDATE: begin
        logic [127:0] st, k;
        st = {rf[b+3], rf[b+2], rf[b+1], rf[b]};
        k  = {rf[b+7], rf[b+6], rf[b+5], rf[b+4]};
        tj_steps(st, k, 128 * s.imm[0]);
        for (int i = 0; i < 8; i++) begin upd[b + i] = (i < 4) ? st[32*i +: 32] : rf[b + i]; updm[b + i] = 1'b1; end
      end
      GIFT_SBOX, PHOTON_SBOX: begin
        w32 w [4];
        for (int i = 0; i < 4; i++) w[i] = rf[b + i];
        if (s.bop == GIFT_SBOX) gift_sbox(w); else photon_sbox(w);
        for (int i = 0; i < 4; i++) begin upd[b + i] = w[i]; updm[b + i] = 1'b1; end
      end
      PHOTON_PERM: begin
        w32 w [8];
        for (int i = 0; i < 8; i++) w[i] = rf[b + i];
        photon_perm(w, s.imm[0]);
        for (int i = 0; i < 8; i++) begin upd[b + i] = w[i]; updm[b + i] = 1'b1; end
      end
      SPK_PERM: begin
        w32 w [8];
        for (int i = 0; i < 8; i++) w[i] = rf[b + i];
        spk_perm(w, s.imm[0]);
        for (int i = 0; i < 8; i++) begin upd[b + i] = w[i]; updm[b + i] = 1'b1; end
      end
      GRAIN_KEYSTREAM: begin
        logic lf [128];
        logic nf [128];
        w32 z;
        for (int i = 0; i < 128; i++) begin lf[i] = rf[b + i/32][i%32]; nf[i] = rf[b + 4 + i/32][i%32]; end
        grain_word(lf, nf, z);
        for (int i = 0; i < 128; i++) begin upd[b + i/32][i%32] = lf[i]; upd[b + 4 + i/32][i%32] = nf[i]; end
        for (int i = 0; i < 8; i++) updm[b + i] = 1'b1;
        upd[b + 8] = z; updm[b + 8] = 1'b1;
      end
      default: begin $display("TB: block op %s not modelled", s.bop.name()); failures++; end
    endcase
    n_units++;
  endfunction

  // All slots read the register state from before the bundle.
  function automatic void model(bundle_t bd);
    word_t upd [64];
    bit    updm [64];
    for (int r = 0; r < 64; r++) begin upd[r] = rf[r]; updm[r] = 1'b0; end
    for (int sl = 0; sl < 3; sl++) begin
      slot_t s;
      s = bd[sl];
      case (s.kind)
        SLOT_GA:  model_ga(s, upd, updm);
        SLOT_BLK: model_blk(s, upd, updm);
        SLOT_MEM: begin
          int unsigned a;
          a = (rf[s.rs[0]] + s.imm[0]) % 16384;
          case (s.mop)
            MEM_ST32:  begin mem[a / 4] = rf[s.rs[1]]; n_store++; end
            MEM_ST128: begin for (int k = 0; k < 4; k++) mem[(a / 16) * 4 + k] = rf[s.rs[1] + k]; n_store++; end
            MEM_LD32:  begin upd[s.rd[0]] = mem[a / 4]; updm[s.rd[0]] = 1'b1; n_load++; end
            MEM_LD128: begin
              for (int k = 0; k < 4; k++) begin upd[s.rd[0] + k] = mem[(a / 16) * 4 + k]; updm[s.rd[0] + k] = 1'b1; end
              n_load++;
            end
            default: ;
          endcase
        end
        default: ;
      endcase
    end
    for (int r = 0; r < 64; r++) if (updm[r]) rf[r] = upd[r];
  endfunction

  // ------------------------------------------------------------ program
  task automatic fill(int unsigned lo, int unsigned hi);
    for (int unsigned r = lo; r <= hi; r++) host_write(r, $urandom);
  endtask

  localparam int unsigned RBASE = 63;   // address register

  initial begin
    int unsigned t0, t1, t2;
    int h0, h1, h2;
    bundle_t b;
    for (int r = 0; r < 64; r++) rf[r] = '0;
    for (int i = 0; i < 4096; i++) mem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // zero the data memory region used below through 128-bit stores of zero registers
    host_write(RBASE, 32'h0000_0100);
    for (int i = 0; i < 8; i++) begin
      b = '0;
      b[0] = s_mem(MEM_ST128, 0, RBASE, 40, 32'(16 * i));
      issue(b, t0, h0);
    end

    // ---- phase 1: two-cycle timing of a block procedure (Ascon p12 on r0..r9)
    fill(0, 9);
    begin
      word_t old0, exp0, v;
      b = '0; b[2] = s_blk(ASCON_PERM, 0, 12);
      old0 = rf[0];
      issue(b, t0, h0);           // returns just after the accepting edge (E2 cycle)
      exp0 = rf[0];
      checks++;
      host_read(0, v);
      if (v === old0 && busy === 1'b1) n_two_cycle++;
      else begin failures++; $display("FAIL: block result visible one cycle after issue"); end
      @(posedge clk); #1;
      checks++;
      host_read(0, v);
      if (v === exp0 && busy === 1'b0) n_two_cycle++;
      else begin failures++; $display("FAIL: block result not written two cycles after issue"); end
    end
    compare_rf("ascon p12");

    // ---- phase 2: back-to-back independent procedures, then a dependent bundle
    fill(10, 16);     // Keccak state
    fill(20, 31);     // Xoodoo state
    b = '0; b[2] = s_blk(KEC_PERM, 10, 18);
    issue(b, t0, h0);
    b = '0; b[2] = s_blk(XOO_PERM, 20, 12);
    issue(b, t1, h1);
    checks++;
    if (t1 == t0 + 1 && h1 == 0) n_back_to_back++;
    else begin failures++; $display("FAIL: independent procedures not issued back to back"); end
    // this GA bundle reads r20, written by the Xoodoo procedure still in flight
    b = '0; b[2] = s_ga(GA_XOR3, 40, 0, 20, 21, 22, 0, 0);
    issue(b, t2, h2);
    checks++;
    if (h2 == 1) n_stall++;
    else begin failures++; $display("FAIL: dependent bundle held %0d cycles, expected 1", h2); end
    compare_rf("keccak/xoodoo");

    // ---- phase 3: single-cycle Generic-Atomic chain
    fill(32, 36);
    b = '0; b[2] = s_ga(GA_XOR5, 37, 0, 32, 33, 34, 35, 36);
    issue(b, t0, h0);
    b = '0; b[1] = s_ga(GA_XORROT, 38, 0, 37, 37, 0, 0, 0, 13);
    issue(b, t1, h1);
    b = '0; b[2] = s_ga(GA_XORNOTAND, 39, 0, 38, 37, 32, 0, 0);
    issue(b, t2, h2);
    checks++;
    if (t1 == t0 + 1 && t2 == t1 + 1 && h1 == 0 && h2 == 0) n_ga_single += 2;
    else begin failures++; $display("FAIL: dependent GA instructions were held"); end
    compare_rf("ga chain");

    // ---- phase 4: loads and stores, full bundles
    // slot0 ST128 of r0..r3, slot1 XOR2, slot2 GIFT S-box on r44..r47
    fill(44, 47);
    b = '0;
    b[0] = s_mem(MEM_ST128, 0, RBASE, 0, 32'h0);
    b[1] = s_ga(GA_XOR2, 48, 49, 32, 33, 34, 35, 0);
    b[2] = s_blk(GIFT_SBOX, 44, 0);
    issue(b, t0, h0);
    // slot0 LD128 into r50..r53, slot1 ST32 of r9, slot2 XORAND
    b = '0;
    b[0] = s_mem(MEM_LD128, 50, RBASE, 0, 32'h0);
    b[1] = s_mem(MEM_ST32, 0, RBASE, 9, 32'h24);
    b[2] = s_ga(GA_XORAND, 54, 0, 48, 49, 37, 0, 0);
    issue(b, t1, h1);
    // slot0 LD32 of the word just stored, slot1 LD32 of a word of the 128-bit store,
    // slot2 a PHOTON S-box layer on the loaded registers (held one cycle)
    b = '0;
    b[0] = s_mem(MEM_LD32, 55, RBASE, 0, 32'h24);
    b[1] = s_mem(MEM_LD32, 56, RBASE, 0, 32'h08);
    b[2] = s_blk(PHOTON_SBOX, 50, 0);
    issue(b, t2, h2);
    checks++;
    if (h2 == 1) n_stall++;
    else begin failures++; $display("FAIL: S-box on loaded registers held %0d cycles, expected 1", h2); end
    compare_rf("loads/stores");

    // ---- phase 5: the remaining units
    fill(0, 7);
    b = '0; b[2] = s_blk(SPK_PERM, 0, 10);
    issue(b, t0, h0);
    fill(8, 15);
    b = '0; b[2] = s_blk(TJ_STATE_UPDATE, 8, 8);
    issue(b, t0, h0);
    fill(16, 24);
    b = '0; b[2] = s_blk(GRAIN_KEYSTREAM, 16, 0);
    issue(b, t0, h0);
    b = '0; b[2] = s_blk(GRAIN_KEYSTREAM, 16, 0);
    issue(b, t1, h1);   // reads the window just written: held one cycle
    checks++;
    if (h1 == 1) n_stall++;
    else begin failures++; $display("FAIL: dependent Grain step held %0d cycles", h1); end
    fill(32, 39);
    b = '0; b[2] = s_blk(PHOTON_PERM, 32, 12);
    issue(b, t0, h0);
    compare_rf("sparkle/tinyjambu/grain/photon");

    // ---- mechanisms
    $display("mechanisms: stall=%0d two_cycle=%0d back_to_back=%0d ga_single=%0d load=%0d store=%0d full_bundle=%0d units=%0d",
             n_stall, n_two_cycle, n_back_to_back, n_ga_single, n_load, n_store, n_full_bundle, n_units);
    checks += 8;
    if (n_stall == 0)        begin failures++; $display("FAIL: no stall"); end
    if (n_two_cycle == 0)    begin failures++; $display("FAIL: no two-cycle check"); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL: no back-to-back issue"); end
    if (n_ga_single == 0)    begin failures++; $display("FAIL: no single-cycle GA use"); end
    if (n_load == 0)         begin failures++; $display("FAIL: no load"); end
    if (n_store == 0)        begin failures++; $display("FAIL: no store"); end
    if (n_full_bundle == 0)  begin failures++; $display("FAIL: no full bundle"); end
    if (n_units < 10)         begin failures++; $display("FAIL: not every unit used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
