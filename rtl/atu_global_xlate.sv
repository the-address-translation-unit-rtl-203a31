// atu_global_xlate: global-segment (reverse) translation.
//
// Combinational. Every global register set (virtual base, limit, physical
// base) is compared with the virtual address at the same time, like the tags
// of a fully associative cache. Set g is in range when no address bit outside
// its segment differs from its virtual base:
//   miss[g] = OR over i = 0..23 of (NOT limit[i] AND (va[i] XOR vbase[i]))
// and in range when miss[g] = 0. A set hits when it is valid, in range and its
// PR bits allow the access. The physical address is the hitting set's
// physical base ORed with the offset, which is the virtual address masked by
// that set's limit (bits 24..31 are always kept).
// Exceptions: no hit but some valid set in range gives EXC_INVALID; no valid
// set in range gives EXC_UNMAPPED.
// Overlapping segments are not prevented; when several sets hit, the lowest
// numbered one is used (this priority is this implementation's choice).
module atu_global_xlate
  import atu_pkg::*;
#(
  parameter int unsigned NUM_GLOBAL = 4
) (
  input  addr_t                        va,
  input  logic                         supervisor,
  input  logic                         write,
  input  addr_t      [NUM_GLOBAL-1:0]  gvbase,
  input  seg_limit_t [NUM_GLOBAL-1:0]  glimit,
  input  addr_t      [NUM_GLOBAL-1:0]  gpbase,
  output addr_t                        pa,
  output atu_exc_e                     exc
);

  localparam int unsigned SEL_W = (NUM_GLOBAL > 1) ? $clog2(NUM_GLOBAL) : 1;

  logic [NUM_GLOBAL-1:0] in_range;
  logic [NUM_GLOBAL-1:0] allowed;
  logic [NUM_GLOBAL-1:0] cand;
  logic [NUM_GLOBAL-1:0] hit;
  logic [SEL_W-1:0]      sel;
  addr_t                 mask;

  for (genvar g = 0; g < NUM_GLOBAL; g++) begin : g_set
    assign in_range[g] =
      ~|(~glimit[g].limit & (va[0:LIMIT_W-1] ^ gvbase[g][0:LIMIT_W-1]));

    atu_pr_check u_pr (
      .pr        (glimit[g].pr),
      .supervisor(supervisor),
      .write     (write),
      .allowed   (allowed[g])
    );

    assign cand[g] = glimit[g].v && in_range[g];
    assign hit[g]  = cand[g] && allowed[g];
  end

  // Lowest-numbered hitting set.
  always_comb begin
    sel = '0;
    for (int g = NUM_GLOBAL - 1; g >= 0; g--) begin
      if (hit[g]) sel = SEL_W'(g);
    end
  end

  assign mask = {glimit[sel].limit, 8'hFF};
  assign pa   = gpbase[sel] | (va & mask);

  always_comb begin
    if (|hit)       exc = EXC_NONE;
    else if (|cand) exc = EXC_INVALID;
    else            exc = EXC_UNMAPPED;
  end

endmodule
