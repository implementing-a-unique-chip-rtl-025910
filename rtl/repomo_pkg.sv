// repomo_pkg - shared types and constants of the REPOMO32 polymorphic array
// and of the chip-ID system built on it.
//
// The array has 4 rows and 8 columns of two-input Configurable Logic Elements
// (CLEs); each CLE is set by one configuration byte.  The byte layout follows
// the bit numbers printed under the three multiplexers of the CLE drawing:
// bits [7:5] select input A, bits [4:2] select input B, bits [1:0] select the
// logic function.  The numeric code of each function and the numbering of the
// multiplexer inputs are this design's own choice (see cle.sv).
//
// A CLE is addressed as addr = column*4 + row (both counted from 0); this
// mapping is also this design's choice.
package repomo_pkg;

  localparam int unsigned NROWS  = 4;
  localparam int unsigned NCOLS  = 8;
  localparam int unsigned NCLE   = NROWS * NCOLS;   // 32 CLEs
  localparam int unsigned ADDR_W = 5;               // addr[4:0]
  localparam int unsigned CFG_W  = 8;               // data[7:0]

  // Logic function of a CLE, in the order the functions are listed for the chip.
  typedef enum logic [1:0] {
    FN_AND     = 2'd0,
    FN_OR      = 2'd1,
    FN_XOR     = 2'd2,
    FN_NANDNOR = 2'd3    // polymorphic: NOR at low Vdd, NAND at high Vdd
  } cle_fn_e;

  // Multiplexer input numbers 0..3 are the previous column's rows 1..4,
  // 4..7 the rows of the column two back.
  typedef struct packed {
    logic [2:0] sel_a;   // bits 7:5
    logic [2:0] sel_b;   // bits 4:2
    cle_fn_e    fn;      // bits 1:0
  } cle_cfg_t;

  // Address of the CLE in column col, row row (both from 0).
  function automatic logic [ADDR_W-1:0] cle_addr(input int unsigned col, input int unsigned row);
    return ADDR_W'(col * NROWS + row);
  endfunction

  // "Wire" setting of the ID procedure: A = B = same row of the previous
  // column, function AND, so the CLE passes that signal on (A AND A = A).
  function automatic cle_cfg_t wire_cfg(input logic [1:0] row);
    cle_cfg_t c;
    c.sel_a = {1'b0, row};
    c.sel_b = {1'b0, row};
    c.fn    = FN_AND;
    return c;
  endfunction

  // NAND/NOR setting of the ID procedure: A from the same row, B from the
  // neighbouring row of the pair (rows 1/2 and 3/4).  With primary inputs
  // X1..X4 = 0,1,0,1 carried along the rows, A and B are always inverse.
  function automatic cle_cfg_t poly_cfg(input logic [1:0] row);
    cle_cfg_t c;
    c.sel_a = {1'b0, row};
    c.sel_b = {1'b0, row ^ 2'd1};
    c.fn    = FN_NANDNOR;
    return c;
  endfunction

  // Switching voltage, in millivolts, given to polymorphic gate idx of the
  // simulated die die_seed.  It stands in for fabrication variation: an integer
  // hash of (die_seed, idx) spread over 3801..3899 mV, between the documented
  // NOR range (up to 3.8 V) and NAND range (from 3.9 V).  Model only.
  function automatic int unsigned gate_vth_mv(input int unsigned die_seed, input int unsigned idx);
    logic [31:0] h;
    h = die_seed * 32'h9E37_79B1 ^ (idx + 32'd1) * 32'h85EB_CA77;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return 32'd3801 + (h % 32'd99);
  endfunction

  // Primary input pattern of the ID procedure, bit 0 = X1.
  localparam logic [NROWS-1:0] ID_X_PATTERN = 4'b1010;

endpackage
