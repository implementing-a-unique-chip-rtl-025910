// vdd_ramp_model - simulation model of the programmable REPOMO32 supply.
//
// While up is 1 the output voltage climbs by STEP_MV per clock from V_LO_MV
// to V_HI_MV; while up is 0 it falls back by the same step.  Reset puts it at
// V_LO_MV.  The linear ramp stands in for the slow supply edge of the real
// board (a ramp of a few microseconds).
module vdd_ramp_model #(
  parameter int unsigned STEP_MV = 1,
  parameter int unsigned V_LO_MV = 3000,
  parameter int unsigned V_HI_MV = 5000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        up,
  output logic [12:0] vdd_mv
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vdd_mv <= 13'(V_LO_MV);
    else if (up) begin
      if (32'(vdd_mv) + STEP_MV >= V_HI_MV) vdd_mv <= 13'(V_HI_MV);
      else vdd_mv <= vdd_mv + 13'(STEP_MV);
    end else begin
      if (32'(vdd_mv) <= V_LO_MV + STEP_MV) vdd_mv <= 13'(V_LO_MV);
      else vdd_mv <= vdd_mv - 13'(STEP_MV);
    end
  end

endmodule
