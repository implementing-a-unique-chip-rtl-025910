// cle - one Configurable Logic Element of the REPOMO32 polymorphic array.
//
// Two 8:1 multiplexers pick inputs A and B from the outputs of the two
// preceding columns; a 4:1 multiplexer then selects AND, OR, XOR or the
// polymorphic NAND/NOR of A and B.  The three multiplexers, their select bits
// (A: cfg[7:5], B: cfg[4:2], function: cfg[1:0]) and the four functions are
// those of the chip.  Which function each 2-bit code picks, and that select
// values 0..3 are the previous column and 4..7 the column two back, are this
// design's assumptions.
//
// The polymorphic gate has no select signal of its own: its function is set by
// the supply voltage.  Here that is the poly_nand input (1 = NAND, above the
// gate's switching voltage; 0 = NOR), which polygate_vdd_model provides in
// simulation.  Purely combinational; no clock.
module cle
  import repomo_pkg::*;
(
  input  cle_cfg_t         cfg,
  input  logic [NROWS-1:0] near_in,   // previous column, rows 1..4
  input  logic [NROWS-1:0] far_in,    // column two back, rows 1..4
  input  logic             poly_nand, // polymorphic gate state
  output logic             y
);

  logic [2*NROWS-1:0] srcs;
  logic               a, b;

  assign srcs = {far_in, near_in};
  assign a    = srcs[cfg.sel_a];
  assign b    = srcs[cfg.sel_b];

  always_comb begin
    unique case (cfg.fn)
      FN_AND:     y = a & b;
      FN_OR:      y = a | b;
      FN_XOR:     y = a ^ b;
      FN_NANDNOR: y = poly_nand ? ~(a & b) : ~(a | b);
      default:    y = 1'b0;
    endcase
  end

endmodule
