// sr_latch_bank - S-R arbiter latches that turn the switching order of the
// polymorphic gates into ID bits.
//
// One latch per pair (i, j), i < j, of the NGATES gate outputs: n(n-1)/2
// latches, 6 for the four outputs Z0..Z3 of REPOMO32.  Pairs are taken in the
// order (0,1), (0,2), (0,3), (1,2), (1,3), (2,3), which gives ID_0 (LSB) to
// ID_5 (MSB); the lower-numbered output drives R and the higher-numbered one
// drives S, as in the drawing of the latch set.
//
// At low Vdd every gate output is 0 (NOR of 0 and 1).  During the ramp to high
// Vdd each output rises when its gate becomes a NAND.  A latch changes only
// while exactly one of its inputs is 1: the first input to rise wins, and once
// both are 1 the latch holds.  So q = 1 when the S gate (higher-numbered
// output) switched first, q = 0 when the R gate did.  Holding with both inputs
// active, and the polarity above, are this design's choices; inputs rising in
// the same instant keep the previous value (a real latch may go metastable).
// Level-sensitive and unclocked: the latches are intentional.  After reading,
// the latches are disturbed again when Vdd falls, so the bits must be copied
// into a register while Vdd is still high.
module sr_latch_bank #(
  parameter int unsigned NGATES = 4,
  localparam int unsigned NBITS = NGATES * (NGATES - 1) / 2
) (
  input  logic [NGATES-1:0] z,
  output logic [NBITS-1:0]  q
);

  for (genvar i = 0; i < NGATES; i++) begin : g_r
    for (genvar j = i + 1; j < NGATES; j++) begin : g_s
      // bit index of pair (i, j) in lexicographic order
      localparam int unsigned K = i * NGATES - (i * (i + 1)) / 2 + (j - i - 1);
      always_latch begin
        if (z[i] ^ z[j])
          q[K] = z[j];   // set when S (z[j]) alone is active, reset when R alone is
      end
    end
  end

endmodule
