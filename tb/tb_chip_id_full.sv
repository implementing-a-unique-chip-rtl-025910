// tb_chip_id_full - one complete 48-bit ID read of chip_id_top with every
// parameter at its default (RAMP_WAIT = 2048, DIE_SEED = 1), the supply
// ramping 1 mV per clock (2000 clocks from 3 V to 5 V).  The ID is compared
// bit by bit with the order in which the die's gates cross their switching
// voltages, and the read must take 88*3 + 8*(2*2048 + 1) cycles.
module tb_chip_id_full;
  import repomo_pkg::*;
  int checks = 0, failures = 0, ties = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic vdd_up, busy, done;
  logic [12:0] vdd_mv;
  logic [47:0] chip_id;
  logic [3:0] z;
  logic [2:0] col;

  always #5 clk = ~clk;

  vdd_ramp_model u_sup (.clk(clk), .rst_n(rst_n), .up(vdd_up), .vdd_mv(vdd_mv));
  chip_id_top dut (.clk(clk), .rst_n(rst_n), .start(start), .vdd_mv(vdd_mv), .vdd_up(vdd_up),
                   .busy(busy), .done(done), .chip_id(chip_id), .z(z), .col(col));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, k;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (!done) begin @(posedge clk); #1; cycles++; end
    checks++;
    if (cycles != 88 * 3 + 8 * (2 * 2048 + 1)) begin failures++; $display("FAIL read took %0d cycles", cycles); end
    $display("ID %012h read in %0d cycles", chip_id, cycles);
    for (int c = 0; c < 8; c++) begin
      k = 0;
      for (int i = 0; i < 4; i++)
        for (int j = i + 1; j < 4; j++) begin
          int vi, vj;
          vi = gate_vth_mv(1, c * 4 + i);
          vj = gate_vth_mv(1, c * 4 + j);
          if (vi == vj) ties++;
          else begin
            checks++;
            if (chip_id[6 * c + k] !== (vj < vi)) begin
              failures++;
              $display("FAIL column %0d bit %0d", c + 1, k);
            end
          end
          k++;
        end
    end
    $display("pairs with equal switching voltage (not checked): %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
