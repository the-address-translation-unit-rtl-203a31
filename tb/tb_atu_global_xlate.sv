// tb_atu_global_xlate: checks global (reverse) translation against the
// arithmetic reference model at the default four register sets. Random
// tables, some with deliberately overlapping segments, are probed with
// addresses inside, at the edge of and past each segment, and with random
// global addresses. Counts hits, invalid accesses, unmapped accesses and
// overlapping hits, and fails if one never occurred.
module tb_atu_global_xlate;
  import atu_pkg::*;
  import atu_ref_pkg::*;

  localparam int NG = 4;

  int checks = 0, failures = 0;
  int n_hit = 0, n_invalid = 0, n_unmapped = 0, n_overlap = 0;

  addr_t               va, pa;
  logic                supervisor, write;
  addr_t      [NG-1:0] gvbase, gpbase;
  seg_limit_t [NG-1:0] glimit;
  atu_exc_e            exc;
  gseg_t               gs [];
  logic clk = 0;

  atu_global_xlate #(.NUM_GLOBAL(NG)) dut (
    .va(va), .supervisor(supervisor), .write(write),
    .gvbase(gvbase), .glimit(glimit), .gpbase(gpbase), .pa(pa), .exc(exc)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_table();
    for (int g = 0; g < NG; g++) begin
      gvbase[g] = gs[g].vbase;
      gpbase[g] = gs[g].pbase;
      glimit[g] = seg_limit_t'(limit_word(gs[g].k, gs[g].v, gs[g].pr));
    end
  endtask

  task automatic check(bit [31:0] a, bit sup, bit wr);
    bit [31:0] exp_pa;
    int        exp_exc, nhit;
    va = a; supervisor = sup; write = wr;
    @(negedge clk);
    ref_global(gs, a, sup, wr, exp_pa, exp_exc, nhit);
    checks++;
    if (int'(exc) !== exp_exc || (exp_exc == R_NONE && pa !== exp_pa)) begin
      failures++;
      $display("FAIL va=%h sup=%b wr=%b pa=%h exc=%0d exp pa=%h exc=%0d",
               a, sup, wr, pa, exc, exp_pa, exp_exc);
    end
    case (exp_exc)
      R_NONE:    n_hit++;
      R_INVALID: n_invalid++;
      default:   n_unmapped++;
    endcase
    if (nhit > 1) n_overlap++;
  endtask

  initial begin
    gs = new[NG];
    // Directed: set 1 maps 64 KB at 0x20010000 to 0x00370000, user RW;
    // set 3 maps 16 MB at 0xF3000000 to 0x01000000, supervisor only.
    foreach (gs[g]) gs[g] = '{vbase: 32'h1000_0000, pbase: 0, k: 8, v: 0, pr: 0};
    gs[1] = '{vbase: 32'h2001_0000, pbase: 32'h0037_0000, k: 16, v: 1, pr: 2'b00};
    gs[3] = '{vbase: 32'hF300_0000, pbase: 32'h0100_0000, k: 24, v: 1, pr: 2'b10};
    load_table();
    check(32'h2001_ABCD, 0, 1);   // 0x0037ABCD
    check(32'h2002_0000, 0, 0);   // past the end: unmapped
    check(32'hF3FF_FFFF, 1, 1);   // 0x01FFFFFF
    check(32'hF312_3456, 0, 0);   // user on a supervisor segment: invalid
    check(32'h1000_0010, 1, 0);   // set 0 not valid: unmapped
    // Overlap: set 0 covers the same range as set 1 but read-only for users.
    gs[0] = '{vbase: 32'h2000_0000, pbase: 32'h0500_0000, k: 20, v: 1, pr: 2'b01};
    load_table();
    check(32'h2001_0004, 0, 0);   // both hit, set 0 wins
    check(32'h2001_0004, 0, 1);   // only set 1 allows the user store
    for (int t = 0; t < 300; t++) begin
      foreach (gs[g]) gs[g] = rand_gseg();
      if ($urandom_range(0, 2) == 0) begin
        // Force an overlap: set b lies inside or around set a.
        int a, b;
        a = int'($urandom_range(0, NG - 1));
        b = (a + 1 + int'($urandom_range(0, NG - 2))) % NG;
        gs[b].k     = rand_k();
        gs[b].vbase = gs[a].vbase & ~((32'd1 << gs[b].k) - 1);
        if (gs[b].vbase < 32'h1000_0000) gs[b].vbase = gs[a].vbase;
        gs[b].pbase = $urandom() & ~((32'd1 << gs[b].k) - 1);
      end
      load_table();
      for (int n = 0; n < 40; n++) begin
        bit [31:0] a;
        int        g;
        g = int'($urandom_range(0, NG));
        if (g == NG) a = $urandom() | 32'h1000_0000;
        else         a = near(gs[g].vbase, gs[g].k);
        if (a < 32'h1000_0000) a = a | 32'h1000_0000;
        check(a, 1'($urandom()), 1'($urandom()));
      end
    end
    checks++;
    if (n_hit == 0 || n_invalid == 0 || n_unmapped == 0 || n_overlap == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("coverage: hit=%0d invalid=%0d unmapped=%0d overlapping=%0d",
             n_hit, n_invalid, n_unmapped, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
