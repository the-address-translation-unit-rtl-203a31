// atu_local_xlate: local-segment translation (scope field 00000).
//
// Combinational. The 3-bit index va[5:7] selects one of the eight local
// base/limit register pairs. The physical address is the segment base ORed
// with the zero-padded 24-bit offset va[8:31]; the base is expected to be
// aligned to the segment size, so the OR acts as an addition.
// Protection is checked in three levels, as the design orders them:
//   1. the selected set must be valid (V = 1), else EXC_UNMAPPED;
//   2. the PR bits must allow the mode and access type, else EXC_INVALID;
//   3. bounds: no offset bit va[8:23] may be set where the limit mask is 0,
//      E = OR over i = 8..23 of (va[i] AND NOT limit[i]), else EXC_UNMAPPED.
// The bounds equation is read so that the limit mask marks the bits inside
// the segment (this is the same sense as the global range-match equation).
// pa is driven whatever exc says; it is only meaningful when exc = EXC_NONE.
module atu_local_xlate
  import atu_pkg::*;
(
  input  addr_t                       va,
  input  logic                        supervisor,
  input  logic                        write,
  input  addr_t      [NUM_LOCAL-1:0]  lbase,
  input  seg_limit_t [NUM_LOCAL-1:0]  llimit,
  output addr_t                       pa,
  output atu_exc_e                    exc
);

  logic [INDEX_W-1:0] index;
  addr_t              base;
  seg_limit_t         lim;
  logic               allowed;
  logic               out_of_bounds;

  assign index = va[5:7];
  assign base  = lbase[index];
  assign lim   = llimit[index];

  // Base ORed with the zero-padded offset.
  assign pa = base | {8'b0, va[8:31]};

  assign out_of_bounds = |(va[LCHK_LO:LCHK_HI] & ~lim.limit[LCHK_LO:LCHK_HI]);

  atu_pr_check u_pr (
    .pr        (lim.pr),
    .supervisor(supervisor),
    .write     (write),
    .allowed   (allowed)
  );

  always_comb begin
    if (!lim.v)             exc = EXC_UNMAPPED;
    else if (!allowed)      exc = EXC_INVALID;
    else if (out_of_bounds) exc = EXC_UNMAPPED;
    else                    exc = EXC_NONE;
  end

endmodule
