// tb_atu_regfile: checks the special purpose register file. After reset
// every register must read zero. Random writes are then mirrored in a
// scoreboard; after each write the read port and every table output
// (local base/limit, global virtual base/limit/physical base) are compared
// with the scoreboard, so a wrong address map or a lost write shows.
// A write must appear on the outputs after exactly one clock edge.
module tb_atu_regfile;
  import atu_pkg::*;

  localparam int NG    = 4;
  localparam int NREGS = 2 * NUM_LOCAL + 3 * NG;
  localparam int AW    = $clog2(NREGS);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [AW-1:0]              addr;
  addr_t                      wdata, rdata;
  addr_t      [NUM_LOCAL-1:0] lbase;
  seg_limit_t [NUM_LOCAL-1:0] llimit;
  addr_t      [NG-1:0]        gvbase, gpbase;
  seg_limit_t [NG-1:0]        glimit;
  bit [31:0]                  sb [NREGS];

  atu_regfile #(.NUM_GLOBAL(NG)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata),
    .lbase(lbase), .llimit(llimit), .gvbase(gvbase), .glimit(glimit), .gpbase(gpbase)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit [31:0] table_out(int r);
    if (r < 8)            return lbase[r];
    else if (r < 16)      return llimit[r - 8];
    else if (r < 16 + NG) return gvbase[r - 16];
    else if (r < 16 + 2 * NG) return glimit[r - 16 - NG];
    else                  return gpbase[r - 16 - 2 * NG];
  endfunction

  task automatic compare_all();
    for (int r = 0; r < NREGS; r++) begin
      addr = AW'(r);
      #1;
      checks += 2;
      if (rdata !== sb[r]) begin
        failures++; $display("FAIL rdata reg %0d = %h exp %h", r, rdata, sb[r]);
      end
      if (table_out(r) !== sb[r]) begin
        failures++; $display("FAIL table reg %0d = %h exp %h", r, table_out(r), sb[r]);
      end
    end
  endtask

  initial begin
    addr = '0; wdata = '0;
    foreach (sb[r]) sb[r] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare_all();
    for (int n = 0; n < 300; n++) begin
      int        r;
      bit [31:0] d;
      r = int'($urandom_range(0, NREGS - 1));
      d = $urandom();
      @(negedge clk);
      we = 1; addr = AW'(r); wdata = d;
      #1;
      // Not yet written before the edge.
      checks++;
      if (rdata !== sb[r]) begin failures++; $display("FAIL early write reg %0d", r); end
      @(negedge clk);
      we = 0;
      sb[r] = d;
      if (n % 25 == 0) compare_all();
      else begin
        addr = AW'(r); #1; checks++;
        if (rdata !== d || table_out(r) !== d) begin
          failures++; $display("FAIL write reg %0d", r);
        end
      end
    end
    compare_all();
    // Reset clears everything again.
    rst_n = 0; #1; rst_n = 1;
    foreach (sb[r]) sb[r] = 0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
