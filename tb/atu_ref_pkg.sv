// atu_ref_pkg: reference model and stimulus helpers for the ATU testbenches.
//
// The model works from segment descriptions (base, size 2^k, valid, PR) and
// uses plain arithmetic: an address is inside a segment when
// base <= va < base + 2^k, and the physical address is pbase + (va - base).
// It never looks at the limit-register bit masks the hardware uses, so it is
// an independent check of them. Exception codes: 0 none, 1 unmapped,
// 2 invalid access.
package atu_ref_pkg;

  typedef struct {
    bit [31:0] base;
    int        k;       // segment size is 2^k bytes, 8 <= k <= 24
    bit        v;
    bit [1:0]  pr;
  } lseg_t;

  typedef struct {
    bit [31:0] vbase;
    bit [31:0] pbase;
    int        k;
    bit        v;
    bit [1:0]  pr;
  } gseg_t;

  localparam int R_NONE = 0, R_UNMAPPED = 1, R_INVALID = 2;

  // Limit register for a 2^k-byte segment: mask of the in-segment address
  // bits above bit 7, V at weight 4, PR in the two lowest bits.
  function automatic bit [31:0] limit_word(int k, bit v, bit [1:0] pr);
    bit [31:0] m;
    m = 32'((64'd1 << k) - 1);
    return (m & 32'hFFFF_FF00) | (32'(v) << 2) | 32'(pr);
  endfunction

  // Access rights per PR value: {supervisor read, supervisor write,
  // user read, user write}.
  function automatic bit pr_ok(bit [1:0] pr, bit sup, bit wr);
    bit [3:0] rights;
    case (pr)
      2'd0: rights = 4'b1111;
      2'd1: rights = 4'b1110;
      2'd2: rights = 4'b1100;
      default: rights = 4'b1000;
    endcase
    if (sup) return wr ? rights[2] : rights[3];
    else     return wr ? rights[0] : rights[1];
  endfunction

  function automatic void ref_local(input lseg_t ls[8], input bit [31:0] va,
                                    input bit sup, input bit wr,
                                    output bit [31:0] pa, output int exc);
    int        idx;
    bit [31:0] off;
    idx = int'(va[26:24]);
    off = va & 32'h00FF_FFFF;
    pa  = ls[idx].base + off;
    if (!ls[idx].v)                          exc = R_UNMAPPED;
    else if (!pr_ok(ls[idx].pr, sup, wr))    exc = R_INVALID;
    else if (64'(off) >= (64'd1 << ls[idx].k)) exc = R_UNMAPPED;
    else                                     exc = R_NONE;
  endfunction

  function automatic void ref_global(input gseg_t gs[], input bit [31:0] va,
                                     input bit sup, input bit wr,
                                     output bit [31:0] pa, output int exc,
                                     output int nhit);
    bit cand;
    cand = 0;
    nhit = 0;
    exc  = R_UNMAPPED;
    pa   = 0;
    foreach (gs[g]) begin
      if (gs[g].v && 64'(va) >= 64'(gs[g].vbase) &&
          64'(va) < 64'(gs[g].vbase) + (64'd1 << gs[g].k)) begin
        cand = 1;
        if (pr_ok(gs[g].pr, sup, wr)) begin
          if (nhit == 0) pa = gs[g].pbase + (va - gs[g].vbase);
          nhit++;
        end
      end
    end
    if (nhit > 0) exc = R_NONE;
    else if (cand) exc = R_INVALID;
  endfunction

  // Whole V2P: path 0 off, 1 direct, 2 local, 3 global.
  function automatic void ref_v2p(input lseg_t ls[8], input gseg_t gs[],
                                  input bit valid, input bit en, input bit sup,
                                  input bit wr, input bit [31:0] va,
                                  output bit [31:0] pa, output int exc,
                                  output int path);
    int nhit;
    if (!en) begin
      path = 0; pa = va; exc = R_NONE;
    end else if (va < 32'h0800_0000) begin
      path = 2; ref_local(ls, va, sup, wr, pa, exc);
    end else if (va < 32'h1000_0000) begin
      path = 1; pa = va; exc = sup ? R_NONE : R_INVALID;
    end else begin
      path = 3; ref_global(gs, va, sup, wr, pa, exc, nhit);
    end
    if (!valid) exc = R_NONE;
  endfunction

  function automatic int rand_k();
    return 8 + int'($urandom_range(0, 16));
  endfunction

  function automatic lseg_t rand_lseg();
    lseg_t s;
    s.k    = rand_k();
    s.base = $urandom() & ~((32'd1 << s.k) - 1);
    s.v    = ($urandom_range(0, 5) != 0);
    s.pr   = 2'($urandom());
    return s;
  endfunction

  // Global segment with a virtual base outside the local/direct regions.
  function automatic gseg_t rand_gseg();
    gseg_t s;
    s.k     = rand_k();
    s.vbase = ($urandom() | 32'h1000_0000) & ~((32'd1 << s.k) - 1);
    if (s.vbase < 32'h1000_0000) s.vbase = 32'h1000_0000;
    s.pbase = $urandom() & ~((32'd1 << s.k) - 1);
    s.v     = ($urandom_range(0, 5) != 0);
    s.pr    = 2'($urandom());
    return s;
  endfunction

  // Address inside, just past, or somewhere near a segment of 2^k at base.
  function automatic bit [31:0] near(bit [31:0] base, int k);
    bit [31:0] size;
    size = 32'd1 << k;
    case ($urandom_range(0, 3))
      0, 1:    return base + ($urandom() & (size - 1));
      2:       return base + size + ($urandom() & 32'hFFFF);
      default: return base + size - 1;
    endcase
  endfunction

endpackage
