// diva_atu: address translation unit of a DIVA processing-in-memory node.
//
// Translates the 32-bit virtual addresses of the node's scalar processor to
// 32-bit physical addresses and enforces segment protection. It joins:
//   * atu_regfile    - the translation table (8 local segments, NUM_GLOBAL
//                      global segments), written by the processor;
//   * atu_controller - decodes the processor's data and instruction requests;
//   * two atu_v2p    - one for data memory requests, one for instruction-
//                      cache requests, both reading the same table;
//   * atu_probe      - diverts the data side's exception into the probe
//                      result during a probe instruction.
// Translation is combinational: dpa/dexc/probe_exc and ipa/iexc follow
// dva/iva and the request signals in the same cycle. Only the table write
// (sr_we) is clocked. Software must not write the table while a translation
// is in flight; an assertion checks that rule.
// The partition into these four parts and their connections follow the DIVA
// ATU design; the clock/reset, the request signal set and the dpath/ipath
// observation outputs are this implementation's own. rst_n both resets the
// register file asynchronously and disables the assertion, which Verilator
// notes as a net used synchronously and asynchronously; that is intended.
module diva_atu
  import atu_pkg::*;
#(
  parameter int unsigned NUM_GLOBAL = 4,
  localparam int unsigned RF_AW = $clog2(2 * NUM_LOCAL + 3 * NUM_GLOBAL)
) (
  input  logic             clk,
  input  logic             rst_n,
  // Register-file port of the scalar unit.
  input  logic             sr_we,
  input  logic [RF_AW-1:0] sr_addr,
  input  addr_t            sr_wdata,
  output addr_t            sr_rdata,
  // Processor state.
  input  logic             xlate_en,
  input  logic             supervisor,
  // Data memory request.
  input  logic             dreq_valid,
  input  mem_op_e          dreq_op,
  input  addr_t            dva,
  output addr_t            dpa,
  output atu_exc_e         dexc,
  output atu_exc_e         probe_exc,
  // Instruction-cache request.
  input  logic             ireq_valid,
  input  addr_t            iva,
  output addr_t            ipa,
  output atu_exc_e         iexc,
  // Which translation each side used (for observation only).
  output xlate_path_e      dpath,
  output xlate_path_e      ipath
);

  addr_t      [NUM_LOCAL-1:0]  lbase;
  seg_limit_t [NUM_LOCAL-1:0]  llimit;
  addr_t      [NUM_GLOBAL-1:0] gvbase;
  seg_limit_t [NUM_GLOBAL-1:0] glimit;
  addr_t      [NUM_GLOBAL-1:0] gpbase;

  v2p_ctl_t    dctl, ictl;
  logic        probe;
  atu_exc_e    dexc_raw;

  atu_regfile #(.NUM_GLOBAL(NUM_GLOBAL)) u_regfile (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (sr_we),
    .addr  (sr_addr),
    .wdata (sr_wdata),
    .rdata (sr_rdata),
    .lbase (lbase),
    .llimit(llimit),
    .gvbase(gvbase),
    .glimit(glimit),
    .gpbase(gpbase)
  );

  atu_controller u_ctrl (
    .xlate_en  (xlate_en),
    .supervisor(supervisor),
    .dreq_valid(dreq_valid),
    .dreq_op   (dreq_op),
    .ireq_valid(ireq_valid),
    .dctl      (dctl),
    .ictl      (ictl),
    .probe     (probe)
  );

  atu_v2p #(.NUM_GLOBAL(NUM_GLOBAL)) u_v2p_mem (
    .ctl   (dctl),
    .va    (dva),
    .lbase (lbase),
    .llimit(llimit),
    .gvbase(gvbase),
    .glimit(glimit),
    .gpbase(gpbase),
    .pa    (dpa),
    .exc   (dexc_raw),
    .path  (dpath)
  );

  atu_v2p #(.NUM_GLOBAL(NUM_GLOBAL)) u_v2p_cache (
    .ctl   (ictl),
    .va    (iva),
    .lbase (lbase),
    .llimit(llimit),
    .gvbase(gvbase),
    .glimit(glimit),
    .gpbase(gpbase),
    .pa    (ipa),
    .exc   (iexc),
    .path  (ipath)
  );

  atu_probe u_probe (
    .probe    (probe),
    .exc_in   (dexc_raw),
    .exc_out  (dexc),
    .probe_exc(probe_exc)
  );

  // The table is never set up while a translation is requested.
  a_no_write_during_xlate: assert property (
    @(posedge clk) disable iff (!rst_n) !(sr_we && (dreq_valid || ireq_valid))
  ) else $error("translation table written during a translation");

endmodule
