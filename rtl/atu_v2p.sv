// atu_v2p: virtual-to-physical translation unit (V2P).
//
// Purely combinational, so a translation completes in the same cycle as the
// request. It picks one of three translations:
//   * ctl.enable = 0: direct translation, PA = VA, never an exception;
//   * scope va[0:4] = 00001 (0x08000000-0x0FFFFFFF): direct translation,
//     PA = VA, but the region belongs to the supervisor, so a user access
//     raises EXC_INVALID (the kind of exception is this implementation's
//     choice);
//   * scope = 00000: local translation (atu_local_xlate);
//   * any of va[0:3] non-zero: global translation (atu_global_xlate).
// The exception output is EXC_NONE unless ctl.valid is set; pa and path are
// driven regardless. The translation table comes straight from the special
// purpose register file. The ATU holds two of these units: one for data
// memory requests and one for instruction-cache requests.
module atu_v2p
  import atu_pkg::*;
#(
  parameter int unsigned NUM_GLOBAL = 4
) (
  input  v2p_ctl_t                     ctl,
  input  addr_t                        va,
  input  addr_t      [NUM_LOCAL-1:0]   lbase,
  input  seg_limit_t [NUM_LOCAL-1:0]   llimit,
  input  addr_t      [NUM_GLOBAL-1:0]  gvbase,
  input  seg_limit_t [NUM_GLOBAL-1:0]  glimit,
  input  addr_t      [NUM_GLOBAL-1:0]  gpbase,
  output addr_t                        pa,
  output atu_exc_e                     exc,
  output xlate_path_e                  path
);

  addr_t    local_pa, global_pa;
  atu_exc_e local_exc, global_exc;
  atu_exc_e raw_exc;

  atu_local_xlate u_local (
    .va        (va),
    .supervisor(ctl.supervisor),
    .write     (ctl.write),
    .lbase     (lbase),
    .llimit    (llimit),
    .pa        (local_pa),
    .exc       (local_exc)
  );

  atu_global_xlate #(.NUM_GLOBAL(NUM_GLOBAL)) u_global (
    .va        (va),
    .supervisor(ctl.supervisor),
    .write     (ctl.write),
    .gvbase    (gvbase),
    .glimit    (glimit),
    .gpbase    (gpbase),
    .pa        (global_pa),
    .exc       (global_exc)
  );

  always_comb begin
    if (!ctl.enable) begin
      path    = PATH_OFF;
      pa      = va;
      raw_exc = EXC_NONE;
    end else if (va[0:4] == SCOPE_LOCAL) begin
      path    = PATH_LOCAL;
      pa      = local_pa;
      raw_exc = local_exc;
    end else if (va[0:4] == SCOPE_DIRECT) begin
      path    = PATH_DIRECT;
      pa      = va;
      raw_exc = ctl.supervisor ? EXC_NONE : EXC_INVALID;
    end else begin
      path    = PATH_GLOBAL;
      pa      = global_pa;
      raw_exc = global_exc;
    end
  end

  assign exc = ctl.valid ? raw_exc : EXC_NONE;

endmodule
