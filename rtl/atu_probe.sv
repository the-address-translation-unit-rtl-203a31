// atu_probe: probe circuit on the exception output of the memory-side V2P.
//
// Combinational. For an ordinary access the V2P's exception goes to the
// processor unchanged and the probe result is EXC_NONE. For a probe
// instruction the exception is withheld from the processor and returned as
// the probe result instead, so a user-level process can learn whether an
// address is mapped (EXC_NONE), unmapped (EXC_UNMAPPED) or not accessible to
// it (EXC_INVALID) without trapping. Diverting the invalid-access case as
// well is this implementation's choice.
module atu_probe
  import atu_pkg::*;
(
  input  logic     probe,
  input  atu_exc_e exc_in,
  output atu_exc_e exc_out,
  output atu_exc_e probe_exc
);

  assign exc_out   = probe ? EXC_NONE : exc_in;
  assign probe_exc = probe ? exc_in   : EXC_NONE;

endmodule
