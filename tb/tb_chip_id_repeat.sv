// tb_chip_id_repeat - stability workload: 1000 consecutive ID reads of one
// die (DIE_SEED 1), with a fast supply ramp (8 mV per clock, RAMP_WAIT 256).
// Every bit whose two gates switch on different ramp steps must read the same
// value every time.  Bits whose gates switch on the same step depend on the
// latch's earlier state; they are counted and the number of bits that changed
// between reads is reported as the unstable-bit share.  The gate model has no
// noise, so only such ties can make a bit unstable here.
module tb_chip_id_repeat;
  import repomo_pkg::*;
  localparam int unsigned STEP  = 8;
  localparam int unsigned W     = 256;
  localparam int unsigned NREAD = 1000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic vdd_up, busy, done;
  logic [12:0] vdd_mv;
  logic [47:0] chip_id, first_id, tie_mask, unstable;
  logic [3:0] z;
  logic [2:0] col;

  always #5 clk = ~clk;

  vdd_ramp_model #(.STEP_MV(STEP)) u_sup (.clk(clk), .rst_n(rst_n), .up(vdd_up), .vdd_mv(vdd_mv));
  chip_id_top #(.RAMP_WAIT(W), .DIE_SEED(1)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .vdd_mv(vdd_mv), .vdd_up(vdd_up),
    .busy(busy), .done(done), .chip_id(chip_id), .z(z), .col(col));

  function automatic int sw_step(input int unsigned g);
    return (gate_vth_mv(1, g) - 3000 + STEP - 1) / STEP;
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    tie_mask = '0;
    for (int c = 0; c < 8; c++) begin
      k = 0;
      for (int i = 0; i < 4; i++)
        for (int j = i + 1; j < 4; j++) begin
          if (sw_step(c * 4 + i) == sw_step(c * 4 + j)) tie_mask[6 * c + k] = 1'b1;
          k++;
        end
    end
    unstable = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NREAD; n++) begin
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (!done) begin @(posedge clk); #1; end
      if (n == 0) first_id = chip_id;
      else begin
        unstable |= chip_id ^ first_id;
        checks++;
        if (((chip_id ^ first_id) & ~tie_mask) != '0) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d: %012h vs %012h", n, chip_id, first_id);
        end
      end
    end
    $display("%0d reads, ID %012h, tied bits %0d, bits that changed %0d (%0d.%02d %%)", NREAD, first_id,
             $countones(tie_mask), $countones(unstable),
             $countones(unstable) * 100 / 48, ($countones(unstable) * 10000 / 48) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
