// qrd_pkg: constants, types and fixed-point helpers shared by the QR
// decomposition accelerator.
//
// Numbers follow the design point of the accelerator: a 16x16 real matrix
// (an 8x8 complex matrix after realification), Q1.15 elements stored as
// sign-extended 32-bit words, one full matrix row per 64-byte memory line,
// 12 CORDIC micro-rotations and a 16-cycle compute latency.
//
// Inside the CORDIC pipelines a value is held in IW = 20 bits: the Q1.15
// value gains two integer bits (the CORDIC gain of about 1.65 times the
// sqrt(2) growth of a plane rotation stays below 4) and two guard fraction
// bits. These internal widths and the guard bits are this design's choice.
// The gain is removed once, at the end of the pipeline, by multiplying with
// INV_K = round(2^15 / K12) = 19898, then rounding (half up) and saturating
// back to Q1.15.
package qrd_pkg;

  localparam int N_DEF    = 16;   // realified matrix dimension
  localparam int ELEM_W   = 16;   // Q1.15
  localparam int WORD_W   = 32;   // stored word per element
  localparam int ITER     = 12;   // CORDIC micro-iterations
  localparam int GUARD    = 2;    // extra fraction bits inside CORDIC
  localparam int IW       = ELEM_W + 2 + GUARD;
  localparam int LAT      = 16;   // QR engine latency, cycles
  localparam int DEPTH    = 64;   // lines per memory block
  localparam int ADDR_W   = 6;    // log2(DEPTH)
  localparam int COL_W    = 4;    // column index width for N_DEF
  localparam logic signed [16:0] INV_K = 17'sd19898;

  typedef logic signed [ELEM_W-1:0] q15_t;
  typedef logic signed [IW-1:0]     cw_t;
  typedef logic [ADDR_W-1:0]        addr_t;

  // Rotation sequence produced by the boundary cell: a pre-rotation by
  // 180 degrees (flip) followed by ITER micro-rotations; dir[k] = 1 means
  // d_k = +1, dir[k] = 0 means d_k = -1.
  typedef struct packed {
    logic             flip;
    logic [ITER-1:0]  dir;
  } rotseq_t;

  // Row-pair tag that travels with an issued pair through the engine.
  typedef struct packed {
    addr_t            piv;
    addr_t            tgt;
    logic [COL_W-1:0] col;
  } pair_tag_t;

  // Q1.15 value to internal CORDIC format.
  function automatic cw_t to_cw(q15_t v);
    cw_t r;
    r = cw_t'(v);
    return r <<< GUARD;
  endfunction

  // One CORDIC micro-rotation: x' = x - d*y*2^-k, y' = y + d*x*2^-k.
  function automatic cw_t micro_x(cw_t x, cw_t y, logic d_pos, int k);
    return d_pos ? x - (y >>> k) : x + (y >>> k);
  endfunction
  function automatic cw_t micro_y(cw_t x, cw_t y, logic d_pos, int k);
    return d_pos ? y + (x >>> k) : y - (x >>> k);
  endfunction

  // Gain compensation product (one pipeline stage).
  typedef logic signed [IW+17-1:0] prod_t;
  function automatic prod_t scale_mul(cw_t v);
    return prod_t'(v) * prod_t'(INV_K);
  endfunction

  // Round half up and saturate a gain-compensated product to Q1.15.
  function automatic q15_t round_sat(prod_t p);
    localparam int SH = 15 + GUARD;
    prod_t r;
    r = (p + (prod_t'(1) <<< (SH - 1))) >>> SH;
    if (r > prod_t'(32767))       return q15_t'(16'sh7fff);
    else if (r < -prod_t'(32768)) return q15_t'(16'sh8000);
    else                          return q15_t'(r);
  endfunction

  // True when round_sat() would clamp.
  function automatic logic would_sat(prod_t p);
    localparam int SH = 15 + GUARD;
    prod_t r;
    r = (p + (prod_t'(1) <<< (SH - 1))) >>> SH;
    return (r > prod_t'(32767)) || (r < -prod_t'(32768));
  endfunction

endpackage
