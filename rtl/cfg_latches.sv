// cfg_latches - configuration store of the REPOMO32 array.
//
// Thirty-two 8-bit level-sensitive latches, one per CLE.  While we is high the
// latch chosen by addr is transparent and follows data; when we falls it keeps
// the last value.  A CLE is therefore configured by setting addr and data and
// then pulsing we; the whole array takes 32 such steps.  addr and data must be
// stable for the whole time we is high.  The latch storage and the
// we/addr/data interface are the chip's; the latches have no reset, so every
// CLE must be written before the array output means anything.
//
// The latches are intentional: the chip keeps its configuration in latch
// registers and has no clock.
module cfg_latches
  import repomo_pkg::*;
#(
  parameter int unsigned NCLE_P = NCLE
) (
  input  logic                 we,
  input  logic [ADDR_W-1:0]    addr,
  input  logic [CFG_W-1:0]     data,
  output logic [CFG_W-1:0]     cfg [NCLE_P]
);

  for (genvar i = 0; i < NCLE_P; i++) begin : g_lat
    logic             open_i;
    logic [CFG_W-1:0] q;
    assign open_i = we && (addr == ADDR_W'(i));
    always_latch begin
      if (open_i) q = data;
    end
    assign cfg[i] = q;
  end

endmodule
