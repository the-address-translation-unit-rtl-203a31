// tb_atu_v2p: checks the complete V2P unit against the reference model.
// Random local and global tables are loaded and addresses are drawn from
// every region (local segments, the supervisor direct region, global
// segments, random) with random enable, mode, access type and request valid.
// Every translation path must be taken and the result must be ready in the
// same cycle as the address (the unit is combinational).
module tb_atu_v2p;
  import atu_pkg::*;
  import atu_ref_pkg::*;

  localparam int NG = 4;

  int checks = 0, failures = 0;
  int n_path [4] = '{0, 0, 0, 0};
  int n_exc  [3] = '{0, 0, 0};

  v2p_ctl_t                   ctl;
  addr_t                      va, pa;
  addr_t      [NUM_LOCAL-1:0] lbase;
  seg_limit_t [NUM_LOCAL-1:0] llimit;
  addr_t      [NG-1:0]        gvbase, gpbase;
  seg_limit_t [NG-1:0]        glimit;
  atu_exc_e                   exc;
  xlate_path_e                path;
  lseg_t                      ls [8];
  gseg_t                      gs [];
  logic clk = 0;

  atu_v2p #(.NUM_GLOBAL(NG)) dut (
    .ctl(ctl), .va(va), .lbase(lbase), .llimit(llimit), .gvbase(gvbase),
    .glimit(glimit), .gpbase(gpbase), .pa(pa), .exc(exc), .path(path)
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
    for (int g = 0; g < NG; g++) begin
      gvbase[g] = gs[g].vbase;
      gpbase[g] = gs[g].pbase;
      glimit[g] = seg_limit_t'(limit_word(gs[g].k, gs[g].v, gs[g].pr));
    end
  endtask

  task automatic check(bit [31:0] a, bit valid, bit en, bit sup, bit wr);
    bit [31:0] exp_pa;
    int        exp_exc, exp_path;
    ctl = '{valid: valid, write: wr, supervisor: sup, enable: en};
    va  = a;
    #1;   // no clock edge: the result must already be there
    ref_v2p(ls, gs, valid, en, sup, wr, a, exp_pa, exp_exc, exp_path);
    checks++;
    if (int'(exc) !== exp_exc || int'(path) !== exp_path ||
        (exp_exc == R_NONE && valid && pa !== exp_pa)) begin
      failures++;
      $display("FAIL va=%h v=%b en=%b sup=%b wr=%b pa=%h exc=%0d path=%0d exp %h %0d %0d",
               a, valid, en, sup, wr, pa, exc, path, exp_pa, exp_exc, exp_path);
    end
    n_path[exp_path]++;
    n_exc[exp_exc]++;
    @(negedge clk);
  endtask

  initial begin
    gs = new[NG];
    for (int t = 0; t < 200; t++) begin
      foreach (ls[i]) ls[i] = rand_lseg();
      foreach (gs[g]) gs[g] = rand_gseg();
      load_table();
      for (int n = 0; n < 50; n++) begin
        bit [31:0] a;
        bit [31:0] off;
        int        i;
        case ($urandom_range(0, 4))
          0: begin
            i   = int'($urandom_range(0, 7));
            off = near(32'd0, ls[i].k);
            a   = {5'b0, 3'(i), off[23:0]};
          end
          1: a = 32'h0800_0000 | ($urandom() & 32'h07FF_FFFF);
          2: begin
            i = int'($urandom_range(0, NG - 1));
            a = near(gs[i].vbase, gs[i].k);
            if (a < 32'h1000_0000) a = gs[i].vbase;
          end
          default: a = $urandom();
        endcase
        check(a, ($urandom_range(0, 7) != 0), ($urandom_range(0, 5) != 0),
              1'($urandom()), 1'($urandom()));
      end
    end
    checks++;
    if (n_path[0] == 0 || n_path[1] == 0 || n_path[2] == 0 || n_path[3] == 0 ||
        n_exc[0] == 0 || n_exc[1] == 0 || n_exc[2] == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("paths: off=%0d direct=%0d local=%0d global=%0d; exceptions: none=%0d unmapped=%0d invalid=%0d",
             n_path[0], n_path[1], n_path[2], n_path[3], n_exc[0], n_exc[1], n_exc[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
