// repomo32 - the REPOMO32 reconfigurable polymorphic module.
//
// A 4 x 8 array of two-input Configurable Logic Elements (cle) and their
// configuration latches (cfg_latches).  Primary inputs X1..X4 (x[0]..x[3])
// enter column 1; the outputs of column 8 are the primary outputs Z0..Z3
// (z[0]..z[3]).  Each CLE in column c chooses its two inputs from the outputs
// of columns c-1 and c-2, as drawn for the CLE in column 3, whose multiplexer
// inputs are the rows of columns 2 and 1.  Columns 1 and 2 have no column two
// back (and column 1 no previous column); there the primary inputs take the
// place of the missing column, which is this design's assumption.
//
// The array is purely combinational: there are no synchronisation registers,
// so z follows x, the configuration and the state of the polymorphic gates
// directly.  poly_nand[i] is the Vdd-dependent state of the NAND/NOR gate in
// the CLE with address i (addr = column*4 + row, from 0); it only matters for
// CLEs configured as NAND/NOR.
module repomo32
  import repomo_pkg::*;
(
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [CFG_W-1:0]  data,
  input  logic [NROWS-1:0]  x,
  input  logic [NCLE-1:0]   poly_nand,
  output logic [NROWS-1:0]  z
);

  logic [CFG_W-1:0] cfg [NCLE];
  logic [NROWS-1:0] col_out [NCOLS];

  cfg_latches #(.NCLE_P(NCLE)) u_cfg (
    .we   (we),
    .addr (addr),
    .data (data),
    .cfg  (cfg)
  );

  for (genvar c = 0; c < NCOLS; c++) begin : g_col
    logic [NROWS-1:0] near_in, far_in;
    if (c == 0) begin : g_first
      assign near_in = x;
      assign far_in  = x;
    end else if (c == 1) begin : g_second
      assign near_in = col_out[0];
      assign far_in  = x;
    end else begin : g_rest
      assign near_in = col_out[c-1];
      assign far_in  = col_out[c-2];
    end
    for (genvar r = 0; r < NROWS; r++) begin : g_row
      cle u_cle (
        .cfg       (cle_cfg_t'(cfg[c*NROWS + r])),
        .near_in   (near_in),
        .far_in    (far_in),
        .poly_nand (poly_nand[c*NROWS + r]),
        .y         (col_out[c][r])
      );
    end
  end

  assign z = col_out[NCOLS-1];

endmodule
