// polygate_vdd_model - behavioural model (not synthesizable circuitry) of how
// one polymorphic NAND/NOR gate of REPOMO32 changes its function with the
// supply voltage.
//
// The real gate is an eight-transistor analog structure whose function is NOR
// for Vdd of 3.0-3.8 V and NAND for Vdd of 3.9-5 V.  Fabrication variation
// moves the exact switching voltage slightly from gate to gate, so during a
// supply ramp neighbouring gates change function at slightly different
// moments; the chip ID is built from that order.  This model reduces the gate
// to that one property: nand_mode is 1 while vdd_mv (the supply in millivolts)
// is at or above the gate's own threshold VTH_MV, otherwise 0.  The logic
// function itself is computed in cle.sv.  The default threshold, 3850 mV, lies
// in the gap between the two documented ranges; per-gate values are chosen by
// the instantiating module.  There is no delay, hysteresis or noise: the model
// is deterministic, so every read of a die gives the same ID.
module polygate_vdd_model #(
  parameter int unsigned VTH_MV = 3850
) (
  input  logic [12:0] vdd_mv,
  output logic        nand_mode
);

  assign nand_mode = (32'(vdd_mv) >= VTH_MV);

endmodule
