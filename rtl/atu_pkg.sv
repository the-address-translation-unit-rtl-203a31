// atu_pkg: types and constants shared by the DIVA PIM address translation unit.
//
// Addresses are 32 bits and are declared logic [0:31]: bit 0 is the most
// significant bit, which is how the address-format drawings of the design
// number them. The virtual address splits into
//   scope  = va[0:4]   (00000 local, 00001 supervisor direct region, else global)
//   index  = va[5:7]   (local segment number, 8 local segments)
//   offset = va[8:31]  (24 bits, so the largest segment is 16 MB)
// A segment limit register holds a limit mask, a valid bit and two protection
// (PR) bits. The field order limit | V | PR follows the design; the exact bit
// positions (limit [0:23], V at 29, PR at [30:31]) are this implementation's
// choice. The limit mask has a 1 in every address bit that lies inside the
// segment, so a 2^k-byte segment (k = 8..24) has the limit value 2^k-1 with the
// low byte cleared.
package atu_pkg;

  localparam int unsigned ADDR_W     = 32;

  typedef logic [0:ADDR_W-1] addr_t;

  localparam int unsigned INDEX_W    = 3;
  localparam int unsigned NUM_LOCAL  = 1 << INDEX_W;   // eight local segments
  localparam int unsigned OFFSET_W   = 24;              // va[8:31]
  localparam int unsigned LIMIT_W    = 24;              // limit mask covers va[0:23]
  // Local bounds check looks at offset bits va[8:23]; va[24:31] always lie
  // inside the 256-byte minimum segment.
  localparam int unsigned LCHK_LO    = 8;
  localparam int unsigned LCHK_HI    = 23;

  localparam logic [0:4] SCOPE_LOCAL  = 5'b00000;
  localparam logic [0:4] SCOPE_DIRECT = 5'b00001;   // 0x08000000-0x0FFFFFFF, supervisor only

  // Protection bits (encoding of the access-mode table):
  //   00 supervisor RW, user RW     01 supervisor RW, user RO
  //   10 supervisor RW, user none   11 supervisor RO, user none
  typedef logic [1:0] pr_t;

  typedef struct packed {
    logic [0:LIMIT_W-1] limit;   // 1 = address bit is inside the segment
    logic [0:4]         rsvd;
    logic               v;       // register set valid
    pr_t                pr;
  } seg_limit_t;

  typedef enum logic [1:0] {
    EXC_NONE     = 2'd0,
    EXC_UNMAPPED = 2'd1,   // no valid segment, or offset outside the segment
    EXC_INVALID  = 2'd2    // mode / access type not allowed by the PR bits
  } atu_exc_e;

  // Which of the three translations produced the result.
  typedef enum logic [1:0] {
    PATH_OFF    = 2'd0,    // translation disabled, PA = VA
    PATH_DIRECT = 2'd1,    // scope 00001, PA = VA, supervisor only
    PATH_LOCAL  = 2'd2,
    PATH_GLOBAL = 2'd3
  } xlate_path_e;

  // Control of one V2P unit, produced by the controller.
  typedef struct packed {
    logic valid;        // a request is being translated
    logic write;        // store access
    logic supervisor;   // processor in supervisor mode
    logic enable;       // address translation enabled
  } v2p_ctl_t;

  // Data-side operation requested by the scalar unit.
  typedef enum logic [1:0] {
    OP_LOAD  = 2'd0,
    OP_STORE = 2'd1,
    OP_PROBE = 2'd2     // interrogate an address without taking an exception
  } mem_op_e;

  // Register-file map: 0-7 local base, 8-15 local limit, then NUM_GLOBAL each
  // of global virtual base, global limit and global physical base.
  localparam int unsigned RF_LBASE  = 0;
  localparam int unsigned RF_LLIMIT = NUM_LOCAL;
  localparam int unsigned RF_GLOBAL = 2 * NUM_LOCAL;

endpackage
