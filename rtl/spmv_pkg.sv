// spmv_pkg: shared sizes, types and IEEE-754 double-precision arithmetic
// functions of the sparse matrix-vector multiply (SpMxV) core.
//
// The core computes y = A*x for a matrix held in row-blocked CRS form: each
// processing element (PE) multiplies the nonzeros of one row by the matching
// x entries, a pipelined accumulator reduces them to ADD_LAT partial sums,
// and a shared summation circuit folds those partial sums into the result
// memory. Sizes follow the double-precision configuration: 64-bit data,
// 16-bit column indices, 1000-entry x and result memories, 8 PEs and a
// 12-cycle floating point adder. The multiplier latency is this design's own
// choice.
//
// fp_add / fp_mul are combinational round-to-nearest-even double-precision
// operations. Subnormal inputs are treated as zero and results that would be
// subnormal are flushed to zero; infinities and NaNs follow IEEE 754 rules
// (any NaN becomes the canonical quiet NaN).
package spmv_pkg;

  localparam int unsigned DATA_W    = 64;    // double precision
  localparam int unsigned COL_W     = 16;    // 2-byte column index
  localparam int unsigned X_DEPTH   = 1000;  // x sub-vector memory
  localparam int unsigned RES_DEPTH = 1000;  // result memory (rows per stripe)
  localparam int unsigned N_PE      = 8;
  localparam int unsigned ADD_LAT   = 12;    // floating point adder latency
  localparam int unsigned MUL_LAT   = 9;     // floating point multiplier latency

  typedef logic [DATA_W-1:0] dbl_t;

  // One cycle of the PE input stream: while valid is high val/col carry a
  // nonzero (or an inserted zero); the first cycle with valid low after a row
  // carries the row ID on col. bank selects the x buffer half to read.
  typedef struct packed {
    logic             valid;
    logic             bank;
    logic [COL_W-1:0] col;
    dbl_t             val;
  } pe_in_t;

  localparam dbl_t QNAN = 64'h7FF8_0000_0000_0000;

  function automatic int unsigned lzc56(input logic [55:0] v);
    int unsigned n;
    n = 56;
    for (int i = 55; i >= 0; i--) begin
      if (v[i]) begin
        n = 55 - i;
        break;
      end
    end
    return n;
  endfunction

  // Double-precision add, round to nearest even.
  function automatic dbl_t fp_add(input dbl_t a, input dbl_t b);
    logic        sa, sb, sr, swap;
    logic [10:0] ea, eb;
    logic [51:0] fa, fb;
    logic        za, zb, ia, ib, na, nb;
    logic [55:0] ma, mb, mbs, sum56;
    logic [56:0] sum57;
    logic [11:0] d;
    logic        sticky, rnd;
    int signed   er;
    int unsigned lz;
    logic [53:0] mr;
    dbl_t        r;
    sa = a[63]; ea = a[62:52]; fa = a[51:0];
    sb = b[63]; eb = b[62:52]; fb = b[51:0];
    za = (ea == 0); zb = (eb == 0);
    ia = (ea == 11'h7FF) && (fa == 0); ib = (eb == 11'h7FF) && (fb == 0);
    na = (ea == 11'h7FF) && (fa != 0); nb = (eb == 11'h7FF) && (fb != 0);
    if (na || nb) return QNAN;
    if (ia && ib) return (sa == sb) ? a : QNAN;
    if (ia) return a;
    if (ib) return b;
    if (za && zb) return {sa & sb, 63'd0};
    if (za) return b;
    if (zb) return a;
    // order operands so that |a| >= |b|
    swap = {eb, fb} > {ea, fa};
    if (swap) begin
      {sa, ea, fa, sb, eb, fb} = {sb, eb, fb, sa, ea, fa};
    end
    ma = {1'b1, fa, 3'b000};
    mb = {1'b1, fb, 3'b000};
    d  = {1'b0, ea} - {1'b0, eb};
    if (d >= 56) begin
      mbs = 56'd1;  // only the sticky bit survives
    end else begin
      mbs    = mb >> d;
      sticky = |(mb & ((56'd1 << d) - 56'd1));
      mbs[0] = mbs[0] | sticky;
    end
    er = int'(ea);
    sr = sa;
    if (sa == sb) begin
      sum57 = {1'b0, ma} + {1'b0, mbs};
      if (sum57[56]) begin
        sum56 = sum57[56:1];
        sum56[0] = sum56[0] | sum57[0];
        er = er + 1;
      end else begin
        sum56 = sum57[55:0];
      end
    end else begin
      sum56 = ma - mbs;
      if (sum56 == 0) return 64'd0;
      lz = lzc56(sum56);
      sum56 = sum56 << lz;
      er = er - int'(lz);
    end
    // round: [55] hidden, [54:3] fraction, [2] guard, [1] round, [0] sticky
    rnd = sum56[2] && (sum56[1] || sum56[0] || sum56[3]);
    mr  = {1'b0, sum56[55:3]} + 54'(rnd);
    if (mr[53]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er <= 0) return {sr, 63'd0};
    if (er >= 2047) return {sr, 11'h7FF, 52'd0};
    r = {sr, 11'(er), mr[51:0]};
    return r;
  endfunction

  // Double-precision multiply, round to nearest even.
  function automatic dbl_t fp_mul(input dbl_t a, input dbl_t b);
    logic         sr;
    logic [10:0]  ea, eb;
    logic [51:0]  fa, fb;
    logic         za, zb, ia, ib;
    logic [105:0] p;
    logic [53:0]  mr;
    logic         g, s, rnd;
    int signed    er;
    sr = a[63] ^ b[63];
    ea = a[62:52]; fa = a[51:0];
    eb = b[62:52]; fb = b[51:0];
    za = (ea == 0); zb = (eb == 0);
    ia = (ea == 11'h7FF) && (fa == 0); ib = (eb == 11'h7FF) && (fb == 0);
    if ((ea == 11'h7FF && fa != 0) || (eb == 11'h7FF && fb != 0)) return QNAN;
    if ((ia && zb) || (ib && za)) return QNAN;
    if (ia || ib) return {sr, 11'h7FF, 52'd0};
    if (za || zb) return {sr, 63'd0};
    p  = {1'b1, fa} * {1'b1, fb};
    er = int'(ea) + int'(eb) - 1023;
    if (p[105]) begin
      mr = {1'b0, p[105:53]};
      g  = p[52];
      s  = |p[51:0];
      er = er + 1;
    end else begin
      mr = {1'b0, p[104:52]};
      g  = p[51];
      s  = |p[50:0];
    end
    rnd = g && (s || mr[0]);
    mr  = mr + 54'(rnd);
    if (mr[53]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er <= 0) return {sr, 63'd0};
    if (er >= 2047) return {sr, 11'h7FF, 52'd0};
    return {sr, 11'(er), mr[51:0]};
  endfunction

endpackage
