// tb_atu_local_xlate: checks local-segment translation against the
// arithmetic reference model. A few directed cases are followed by random
// segment tables and addresses aimed inside, at the last byte of, and past
// each segment, in both modes and for loads and stores. It counts how often
// each outcome (hit, invalid segment, PR violation, bounds violation)
// occurred and fails if one never did.
module tb_atu_local_xlate;
  import atu_pkg::*;
  import atu_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_hit = 0, n_unmapped_v = 0, n_invalid = 0, n_bounds = 0;

  addr_t                      va, pa;
  logic                       supervisor, write;
  addr_t      [NUM_LOCAL-1:0] lbase;
  seg_limit_t [NUM_LOCAL-1:0] llimit;
  atu_exc_e                   exc;
  lseg_t                      ls [8];
  logic clk = 0;

  atu_local_xlate dut (
    .va(va), .supervisor(supervisor), .write(write),
    .lbase(lbase), .llimit(llimit), .pa(pa), .exc(exc)
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
    for (int i = 0; i < 8; i++) begin
      lbase[i]  = ls[i].base;
      llimit[i] = seg_limit_t'(limit_word(ls[i].k, ls[i].v, ls[i].pr));
    end
  endtask

  task automatic check(bit [31:0] a, bit sup, bit wr);
    bit [31:0] exp_pa;
    int        exp_exc;
    va = a; supervisor = sup; write = wr;
    @(negedge clk);
    ref_local(ls, a, sup, wr, exp_pa, exp_exc);
    checks++;
    if (int'(exc) !== exp_exc || (exp_exc == R_NONE && pa !== exp_pa)) begin
      failures++;
      $display("FAIL va=%h sup=%b wr=%b pa=%h exc=%0d exp pa=%h exc=%0d",
               a, sup, wr, pa, exc, exp_pa, exp_exc);
    end
    if (exp_exc == R_NONE) n_hit++;
    else if (exp_exc == R_INVALID) n_invalid++;
    else if (!ls[int'(a[26:24])].v) n_unmapped_v++;
    else n_bounds++;
  endtask

  initial begin
    // Directed: segment 2 is 4 KB at 0x40000000, user read-only.
    foreach (ls[i]) ls[i] = '{base: 0, k: 8, v: 0, pr: 0};
    ls[2] = '{base: 32'h4000_0000, k: 12, v: 1, pr: 2'b01};
    ls[7] = '{base: 32'h7F00_0000, k: 24, v: 1, pr: 2'b11};
    load_table();
    check(32'h0200_0123, 0, 0);   // hit: 0x40000123
    check(32'h0200_0FFF, 1, 1);   // last byte, supervisor write
    check(32'h0200_1000, 1, 0);   // one past the end: bounds
    check(32'h0200_0010, 0, 1);   // user store to a read-only segment
    check(32'h0100_0000, 1, 0);   // segment 1 invalid
    check(32'h07FF_FFFF, 1, 0);   // 16 MB segment, last byte
    check(32'h0712_3456, 1, 1);   // supervisor store to PR=11
    check(32'h0712_3456, 0, 0);   // user read to PR=11
    // Random tables and addresses.
    for (int t = 0; t < 200; t++) begin
      foreach (ls[i]) ls[i] = rand_lseg();
      load_table();
      for (int n = 0; n < 50; n++) begin
        int        idx;
        bit [31:0] off;
        idx = int'($urandom_range(0, 7));
        off = near(32'd0, ls[idx].k) & 32'h00FF_FFFF;
        check({5'b0, 3'(idx), off[23:0]}, 1'($urandom()), 1'($urandom()));
      end
    end
    checks++;
    if (n_hit == 0 || n_unmapped_v == 0 || n_invalid == 0 || n_bounds == 0) begin
      failures++;
      $display("FAIL coverage hit=%0d v=%0d invalid=%0d bounds=%0d",
               n_hit, n_unmapped_v, n_invalid, n_bounds);
    end
    $display("coverage: hit=%0d unmapped(V=0)=%0d invalid=%0d bounds=%0d",
             n_hit, n_unmapped_v, n_invalid, n_bounds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
