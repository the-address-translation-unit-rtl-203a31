// tb_diva_atu: end-to-end test of the address translation unit at its
// default size (8 local segments, 4 global register sets).
// The table is set up through the register-file port exactly as system
// software would, read back, and then data and instruction requests are
// issued together on both V2P units. Every result is compared with the
// arithmetic reference model, in the same cycle as the request (the
// translation path has no register). A directed phase is followed by random
// phases, each with a freshly written table. The test counts each mechanism
// of the unit and fails if one never happened: translation disabled, the
// supervisor direct region (allowed and refused), local hit, local invalid
// segment, local protection fault, local bounds fault, global hit, global
// unmapped, global protection fault, overlapping global segments, a probe
// that hid an exception, a probe of a mapped address, an instruction-side
// exception, a table rewrite, and both sides translating in one cycle.
module tb_diva_atu;
  import atu_pkg::*;
  import atu_ref_pkg::*;

  localparam int NG    = 4;
  localparam int NREGS = 2 * NUM_LOCAL + 3 * NG;
  localparam int AW    = $clog2(NREGS);

  typedef enum int {
    M_OFF, M_DIRECT_OK, M_DIRECT_FAULT, M_LOCAL_HIT, M_LOCAL_NOTVALID,
    M_LOCAL_PR, M_LOCAL_BOUNDS, M_GLOBAL_HIT, M_GLOBAL_UNMAPPED, M_GLOBAL_PR,
    M_GLOBAL_OVERLAP, M_PROBE_HIDDEN, M_PROBE_MAPPED, M_IFETCH_FAULT,
    M_TABLE_WRITE, M_BOTH_SIDES, M_COUNT
  } mech_e;

  string mech_name [M_COUNT] = '{
    "translation off", "direct region, supervisor", "direct region, user fault",
    "local hit", "local segment not valid", "local protection fault",
    "local bounds fault", "global hit", "global unmapped",
    "global protection fault", "overlapping global hit", "probe hid exception",
    "probe of mapped address", "instruction-side exception", "table write",
    "both sides in one cycle"};

  int checks = 0, failures = 0;
  int mech [M_COUNT];

  logic            clk = 0, rst_n = 0;
  logic            sr_we = 0;
  logic [AW-1:0]   sr_addr = '0;
  addr_t           sr_wdata = '0, sr_rdata;
  logic            xlate_en = 0, supervisor = 1;
  logic            dreq_valid = 0, ireq_valid = 0;
  mem_op_e         dreq_op = OP_LOAD;
  addr_t           dva = '0, iva = '0, dpa, ipa;
  atu_exc_e        dexc, probe_exc, iexc;
  xlate_path_e     dpath, ipath;

  lseg_t ls [8];
  gseg_t gs [];

  diva_atu dut (
    .clk(clk), .rst_n(rst_n),
    .sr_we(sr_we), .sr_addr(sr_addr), .sr_wdata(sr_wdata), .sr_rdata(sr_rdata),
    .xlate_en(xlate_en), .supervisor(supervisor),
    .dreq_valid(dreq_valid), .dreq_op(dreq_op), .dva(dva),
    .dpa(dpa), .dexc(dexc), .probe_exc(probe_exc),
    .ireq_valid(ireq_valid), .iva(iva), .ipa(ipa), .iexc(iexc),
    .dpath(dpath), .ipath(ipath)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- register-file port -------------------------------------------------
  task automatic sr_write(int r, bit [31:0] d);
    @(negedge clk);
    sr_we = 1; sr_addr = AW'(r); sr_wdata = d;
    @(negedge clk);
    sr_we = 0;
  endtask

  function automatic bit [31:0] expected_reg(int r);
    if (r < 8)                return ls[r].base;
    else if (r < 16)          return limit_word(ls[r - 8].k, ls[r - 8].v, ls[r - 8].pr);
    else if (r < 16 + NG)     return gs[r - 16].vbase;
    else if (r < 16 + 2 * NG) return limit_word(gs[r - 16 - NG].k, gs[r - 16 - NG].v, gs[r - 16 - NG].pr);
    else                      return gs[r - 16 - 2 * NG].pbase;
  endfunction

  task automatic program_table();
    for (int r = 0; r < NREGS; r++) begin
      sr_write(r, expected_reg(r));
      mech[M_TABLE_WRITE]++;
    end
    for (int r = 0; r < NREGS; r++) begin
      sr_addr = AW'(r);
      #1;
      checks++;
      if (sr_rdata !== expected_reg(r)) begin
        failures++;
        $display("FAIL readback reg %0d = %h exp %h", r, sr_rdata, expected_reg(r));
      end
    end
  endtask

  // ---- one cycle with a data and an instruction request -------------------
  task automatic classify(int path, int exc, bit [31:0] a, bit sup);
    int ex, nhit;
    bit [31:0] p;
    case (path)
      0: mech[M_OFF]++;
      1: if (exc == R_NONE) mech[M_DIRECT_OK]++; else mech[M_DIRECT_FAULT]++;
      2: begin
        if (exc == R_NONE) mech[M_LOCAL_HIT]++;
        else if (exc == R_INVALID) mech[M_LOCAL_PR]++;
        else if (!ls[int'(a[26:24])].v) mech[M_LOCAL_NOTVALID]++;
        else mech[M_LOCAL_BOUNDS]++;
      end
      default: begin
        ref_global(gs, a, sup, 1'b0, p, ex, nhit);
        if (exc == R_NONE) mech[M_GLOBAL_HIT]++;
        else if (exc == R_INVALID) mech[M_GLOBAL_PR]++;
        else mech[M_GLOBAL_UNMAPPED]++;
        if (nhit > 1) mech[M_GLOBAL_OVERLAP]++;
      end
    endcase
  endtask

  task automatic request(bit en, bit sup, bit dv, mem_op_e op, bit [31:0] da,
                         bit iv, bit [31:0] ia);
    bit [31:0] exp_dpa, exp_ipa;
    int        d_exc, d_path, i_exc, i_path;
    bit        is_probe;
    @(negedge clk);
    xlate_en = en; supervisor = sup;
    dreq_valid = dv; dreq_op = op; dva = da;
    ireq_valid = iv; iva = ia;
    #1;   // same cycle: no clock edge between request and result
    is_probe = (op == OP_PROBE);
    ref_v2p(ls, gs, dv, en, sup, (op == OP_STORE), da, exp_dpa, d_exc, d_path);
    ref_v2p(ls, gs, iv, en, sup, 1'b0, ia, exp_ipa, i_exc, i_path);
    if (dv) begin
      checks += 3;
      if (int'(dexc) !== (is_probe ? R_NONE : d_exc)) begin
        failures++; $display("FAIL dexc va=%h op=%0d got %0d exp %0d", da, op, dexc, d_exc);
      end
      if (int'(probe_exc) !== (is_probe ? d_exc : R_NONE)) begin
        failures++; $display("FAIL probe_exc va=%h got %0d exp %0d", da, probe_exc, d_exc);
      end
      if (d_exc == R_NONE && dpa !== exp_dpa) begin
        failures++; $display("FAIL dpa va=%h got %h exp %h", da, dpa, exp_dpa);
      end
      if (op != OP_STORE) classify(d_path, d_exc, da, sup);
      if (is_probe && d_exc != R_NONE) mech[M_PROBE_HIDDEN]++;
      if (is_probe && d_exc == R_NONE && d_path >= 2) mech[M_PROBE_MAPPED]++;
    end
    if (iv) begin
      checks += 2;
      if (int'(iexc) !== i_exc) begin
        failures++; $display("FAIL iexc va=%h got %0d exp %0d", ia, iexc, i_exc);
      end
      if (i_exc == R_NONE && ipa !== exp_ipa) begin
        failures++; $display("FAIL ipa va=%h got %h exp %h", ia, ipa, exp_ipa);
      end
      classify(i_path, i_exc, ia, sup);
      if (i_exc != R_NONE) mech[M_IFETCH_FAULT]++;
    end
    if (dv && iv) mech[M_BOTH_SIDES]++;
    @(negedge clk);
    dreq_valid = 0; ireq_valid = 0;
  endtask

  function automatic bit [31:0] rand_va();
    bit [31:0] off, a;
    int        i;
    case ($urandom_range(0, 4))
      0, 1: begin
        i   = int'($urandom_range(0, 7));
        off = near(32'd0, ls[i].k);
        a   = {5'b0, 3'(i), off[23:0]};
      end
      2: a = 32'h0800_0000 | ($urandom() & 32'h07FF_FFFF);
      3: begin
        i = int'($urandom_range(0, NG - 1));
        a = near(gs[i].vbase, gs[i].k);
        if (a < 32'h1000_0000) a = gs[i].vbase;
      end
      default: a = $urandom();
    endcase
    return a;
  endfunction

  initial begin
    foreach (mech[m]) mech[m] = 0;
    gs = new[NG];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- directed phase -----------------------------------------------------
    // Local segment 0: 64 KB of kernel text at 0x00100000, supervisor RO.
    // Local segment 1: 4 KB user stack at 0x00200000, user RW.
    // Local segment 2: 1 MB user data at 0x00400000, user RO.
    // Global set 0: 16 MB at 0x40000000 -> 0x01000000, user RW.
    // Global set 1: 64 KB at 0x40010000 -> 0x00800000, supervisor only
    //               (overlaps set 0).
    foreach (ls[i]) ls[i] = '{base: 0, k: 8, v: 0, pr: 0};
    ls[0] = '{base: 32'h0010_0000, k: 16, v: 1, pr: 2'b11};
    ls[1] = '{base: 32'h0020_0000, k: 12, v: 1, pr: 2'b00};
    ls[2] = '{base: 32'h0040_0000, k: 20, v: 1, pr: 2'b01};
    foreach (gs[g]) gs[g] = '{vbase: 32'h1000_0000, pbase: 0, k: 8, v: 0, pr: 0};
    gs[0] = '{vbase: 32'h4000_0000, pbase: 32'h0100_0000, k: 24, v: 1, pr: 2'b00};
    gs[1] = '{vbase: 32'h4001_0000, pbase: 32'h0080_0000, k: 16, v: 1, pr: 2'b10};
    program_table();

    request(0, 0, 1, OP_LOAD,  32'h1234_5678, 1, 32'h0000_0040);   // off
    request(1, 1, 1, OP_STORE, 32'h0800_1000, 1, 32'h0800_2000);   // direct, sup
    request(1, 0, 1, OP_LOAD,  32'h0800_1000, 1, 32'h0100_0010);   // direct user fault
    request(1, 0, 1, OP_STORE, 32'h0100_0FF0, 1, 32'h0000_0100);   // stack; ifetch user on sup seg
    request(1, 1, 1, OP_LOAD,  32'h0100_1000, 1, 32'h0000_FFFC);   // bounds; kernel fetch
    request(1, 0, 1, OP_STORE, 32'h0208_0000, 0, 32'h0);           // user store to RO
    request(1, 0, 1, OP_LOAD,  32'h0308_0000, 0, 32'h0);           // segment 3 invalid
    request(1, 0, 1, OP_LOAD,  32'h40AB_CDEF, 1, 32'h4001_0010);   // global hit; overlap (set 0 for user)
    request(1, 1, 1, OP_LOAD,  32'h4001_0010, 0, 32'h0);           // overlap: set 0 wins
    request(1, 0, 1, OP_LOAD,  32'h5000_0000, 0, 32'h0);           // global unmapped
    request(1, 0, 1, OP_PROBE, 32'h5000_0000, 0, 32'h0);           // probe hides it
    request(1, 0, 1, OP_PROBE, 32'h0200_0010, 0, 32'h0);           // probe mapped
    // Rewrite one register: set 0 becomes supervisor-only, so a user access
    // that only set 0 covers now faults.
    gs[0].pr = 2'b11;
    sr_write(16 + NG, limit_word(gs[0].k, gs[0].v, gs[0].pr));
    mech[M_TABLE_WRITE]++;
    request(1, 0, 1, OP_LOAD,  32'h40AB_CDEF, 0, 32'h0);           // global PR fault
    request(1, 0, 1, OP_PROBE, 32'h0100_2000, 1, 32'h4000_0000);   // probe of bounds fault

    // ---- random phases ----------------------------------------------------
    for (int t = 0; t < 60; t++) begin
      foreach (ls[i]) ls[i] = rand_lseg();
      foreach (gs[g]) gs[g] = rand_gseg();
      if (t % 3 == 0) begin
        gs[1].k     = rand_k();
        gs[1].vbase = gs[0].vbase & ~((32'd1 << gs[1].k) - 1);
        if (gs[1].vbase < 32'h1000_0000) gs[1].vbase = gs[0].vbase;
        gs[1].pbase = $urandom() & ~((32'd1 << gs[1].k) - 1);
      end
      program_table();
      for (int n = 0; n < 100; n++) begin
        mem_op_e op;
        case ($urandom_range(0, 3))
          0, 1: op = OP_LOAD;
          2:    op = OP_STORE;
          default: op = OP_PROBE;
        endcase
        request(($urandom_range(0, 7) != 0), 1'($urandom()),
                ($urandom_range(0, 5) != 0), op, rand_va(),
                ($urandom_range(0, 3) != 0), rand_va());
      end
    end

    foreach (mech[m]) begin
      checks++;
      $display("  %-28s %0d", mech_name[m], mech[m]);
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
