// tb_atu_pr_check: exhaustive check of the access-protection decision.
// All 16 combinations of PR, mode and access type are compared with the
// access-mode table held as a rights list in atu_ref_pkg.
module tb_atu_pr_check;
  import atu_pkg::*;
  import atu_ref_pkg::*;

  int checks = 0, failures = 0;
  pr_t  pr;
  logic supervisor, write, allowed;
  logic clk = 0;

  atu_pr_check dut (.pr(pr), .supervisor(supervisor), .write(write), .allowed(allowed));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {pr, supervisor, write} = 4'(i);
      #1;
      checks++;
      if (allowed !== pr_ok(pr, supervisor, write)) begin
        failures++;
        $display("FAIL pr=%b sup=%b wr=%b allowed=%b", pr, supervisor, write, allowed);
      end
    end
    // Spot checks written out from the table.
    pr = 2'b11; supervisor = 1; write = 1; #1; checks++; if (allowed) failures++;
    pr = 2'b01; supervisor = 0; write = 0; #1; checks++; if (!allowed) failures++;
    pr = 2'b10; supervisor = 0; write = 0; #1; checks++; if (allowed) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
