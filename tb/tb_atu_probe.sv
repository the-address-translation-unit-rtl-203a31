// tb_atu_probe: exhaustive check of the probe circuit. For every exception
// code, an ordinary access must pass it to the processor and report nothing
// as the probe result; a probe must do the opposite.
module tb_atu_probe;
  import atu_pkg::*;

  int checks = 0, failures = 0;
  logic     probe;
  atu_exc_e exc_in, exc_out, probe_exc;
  logic clk = 0;

  atu_probe dut (.probe(probe), .exc_in(exc_in), .exc_out(exc_out), .probe_exc(probe_exc));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static atu_exc_e codes [3] = '{EXC_NONE, EXC_UNMAPPED, EXC_INVALID};
    for (int p = 0; p < 2; p++) begin
      foreach (codes[c]) begin
        probe  = p[0];
        exc_in = codes[c];
        #1;
        checks += 2;
        if (exc_out !== (p != 0 ? EXC_NONE : codes[c])) begin
          failures++; $display("FAIL exc_out probe=%0d in=%0d out=%0d", p, c, exc_out);
        end
        if (probe_exc !== (p != 0 ? codes[c] : EXC_NONE)) begin
          failures++; $display("FAIL probe_exc probe=%0d in=%0d out=%0d", p, c, probe_exc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
