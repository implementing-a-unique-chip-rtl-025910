// chip_id_top - unclonable 48-bit chip ID read from the polymorphic gates of
// a REPOMO32 array.
//
// The idea: a polymorphic NAND/NOR gate switches its function when the supply
// voltage passes a threshold, and that threshold differs slightly from gate to
// gate because of fabrication variation.  Ramping Vdd from 3 V to 5 V makes
// the four NAND/NOR gates of one column switch in a die-specific order; an S-R
// latch on each of the six pairs of outputs records which gate of the pair was
// first, giving six ID bits per column and 48 bits over the eight columns.
//
// Parts:
//   u_ctrl  id_controller       configures the array, requests the Vdd ramps,
//                                holds the 48-bit ID register (CPLD logic)
//   u_array repomo32            4 x 8 CLE array with configuration latches
//   g_gate  polygate_vdd_model  one per CLE: Vdd-dependent NAND/NOR state
//                                (behavioural; thresholds set by DIE_SEED)
//   u_sr    sr_latch_bank       six S-R arbiter latches on Z0..Z3
//
// The supply itself is outside: vdd_up asks for high (1) or low (0) Vdd and
// vdd_mv reports the actual level in millivolts.  The supply must reach 5 V
// (or settle back to 3 V) within RAMP_WAIT clock cycles of a change of vdd_up.
// start begins one ID read; done pulses when chip_id is complete.  One read
// takes 32 + 7*8 configuration steps of 3 cycles each plus 16 waits of
// RAMP_WAIT cycles, and a few cycles of overhead.
// Because the gate models are behavioural, this module is a simulation model
// of the system as a whole; every other part is synthesizable RTL.
module chip_id_top
  import repomo_pkg::*;
#(
  parameter int unsigned RAMP_WAIT = 2048,
  parameter int unsigned DIE_SEED  = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [12:0] vdd_mv,
  output logic        vdd_up,
  output logic        busy,
  output logic        done,
  output logic [47:0] chip_id,
  output logic [3:0]  z,
  output logic [2:0]  col     // column currently read (0 = column 1)
);

  logic              we;
  logic [ADDR_W-1:0] addr;
  logic [CFG_W-1:0]  data;
  logic [NROWS-1:0]  x;
  logic [NCLE-1:0]   poly_nand;
  logic [5:0]        sr_q;

  id_controller #(.RAMP_WAIT(RAMP_WAIT)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .we      (we),
    .addr    (addr),
    .data    (data),
    .x       (x),
    .vdd_up  (vdd_up),
    .sr_q    (sr_q),
    .busy    (busy),
    .done    (done),
    .col     (col),
    .chip_id (chip_id)
  );

  for (genvar i = 0; i < NCLE; i++) begin : g_gate
    polygate_vdd_model #(.VTH_MV(gate_vth_mv(DIE_SEED, i))) u_gate (
      .vdd_mv    (vdd_mv),
      .nand_mode (poly_nand[i])
    );
  end

  repomo32 u_array (
    .we        (we),
    .addr      (addr),
    .data      (data),
    .x         (x),
    .poly_nand (poly_nand),
    .z         (z)
  );

  sr_latch_bank #(.NGATES(NROWS)) u_sr (
    .z (z),
    .q (sr_q)
  );

endmodule
