// atu_regfile: special purpose register file holding the translation table.
//
// The PIM processor writes and reads the table through a single register
// port; all registers are also presented in parallel to both V2P units, so a
// translation is a static table look-up with no read port in its path.
// Contents: eight local base and eight local limit registers, and for each of
// the NUM_GLOBAL global sets a virtual base, a limit and a physical base.
// Register map (this implementation's choice):
//   0 .. 7                       local base 0..7
//   8 .. 15                      local limit 0..7
//   16 + g                       global virtual base g
//   16 + NUM_GLOBAL + g          global limit g
//   16 + 2*NUM_GLOBAL + g        global physical base g
// Timing: a write takes effect at the rising clock edge; rdata is a
// combinational read of the addressed register (0 for an unused address).
// Reset clears every register, which leaves every segment invalid.
// System software never changes the table while translating, so no bypass
// from the write port to the table outputs is provided.
module atu_regfile
  import atu_pkg::*;
#(
  parameter int unsigned NUM_GLOBAL = 4,
  localparam int unsigned NUM_REGS  = 2 * NUM_LOCAL + 3 * NUM_GLOBAL,
  localparam int unsigned AW        = $clog2(NUM_REGS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         we,
  input  logic [AW-1:0]                addr,
  input  addr_t                        wdata,
  output addr_t                        rdata,
  output addr_t      [NUM_LOCAL-1:0]   lbase,
  output seg_limit_t [NUM_LOCAL-1:0]   llimit,
  output addr_t      [NUM_GLOBAL-1:0]  gvbase,
  output seg_limit_t [NUM_GLOBAL-1:0]  glimit,
  output addr_t      [NUM_GLOBAL-1:0]  gpbase
);

  addr_t regs [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_REGS; r++) regs[r] <= '0;
    end else if (we && (32'(addr) < NUM_REGS)) begin
      regs[addr] <= wdata;
    end
  end

  assign rdata = (32'(addr) < NUM_REGS) ? regs[addr] : '0;

  for (genvar i = 0; i < NUM_LOCAL; i++) begin : g_local
    assign lbase[i]  = regs[RF_LBASE + i];
    assign llimit[i] = seg_limit_t'(regs[RF_LLIMIT + i]);
  end

  for (genvar g = 0; g < NUM_GLOBAL; g++) begin : g_global
    assign gvbase[g] = regs[RF_GLOBAL + g];
    assign glimit[g] = seg_limit_t'(regs[RF_GLOBAL + NUM_GLOBAL + g]);
    assign gpbase[g] = regs[RF_GLOBAL + 2 * NUM_GLOBAL + g];
  end

endmodule
