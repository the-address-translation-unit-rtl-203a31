// atu_controller: turns the scalar unit's request signals into control for
// the two V2P units and the probe circuit.
//
// Combinational, so it adds no cycle to a translation. The data request
// (load, store or probe) drives the memory-side V2P; the instruction fetch
// drives the cache-side V2P, always as a read. Both units share the
// processor's mode and the translation-enable bit. A probe is translated as a
// read in the current mode and flagged to the probe circuit, which keeps its
// exception away from the processor. The signal set of the scalar unit is
// this implementation's choice.
module atu_controller
  import atu_pkg::*;
(
  input  logic      xlate_en,
  input  logic      supervisor,
  input  logic      dreq_valid,
  input  mem_op_e   dreq_op,
  input  logic      ireq_valid,
  output v2p_ctl_t  dctl,
  output v2p_ctl_t  ictl,
  output logic      probe
);

  always_comb begin
    dctl.valid      = dreq_valid;
    dctl.write      = dreq_valid && (dreq_op == OP_STORE);
    dctl.supervisor = supervisor;
    dctl.enable     = xlate_en;

    ictl.valid      = ireq_valid;
    ictl.write      = 1'b0;
    ictl.supervisor = supervisor;
    ictl.enable     = xlate_en;

    probe           = dreq_valid && (dreq_op == OP_PROBE);
  end

endmodule
