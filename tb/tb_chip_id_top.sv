// tb_chip_id_top - end-to-end test of the chip-ID system on three simulated
// dies (DIE_SEED 1, 2, 3), each with its own supply ramp model.
// The expected ID is worked out here from the gate switching voltages of each
// die: with the supply rising STEP_MV per clock from 3000 mV, gate g turns
// into a NAND in ramp step ceil((Vth_g - 3000) / STEP_MV); for the pair (i, j)
// of column k the ID bit is 1 when gate j switched in an earlier step than
// gate i and 0 when it switched later.  Pairs that switch in the same step
// are not checked (a real latch would be metastable) but counted.
// The mechanisms of the procedure are counted and each must occur: the full
// 32-step configuration, the 8-step partial reconfigurations, Vdd ramps, gate
// outputs switching, latches ending set and latches ending reset.  Distinct
// dies must give distinct IDs; the cycle count of one read is checked too.
module tb_chip_id_top;
  import repomo_pkg::*;
  localparam int unsigned STEP = 8;     // 250 clocks for a 3 V -> 5 V ramp
  localparam int unsigned W    = 256;   // controller wait per ramp
  localparam int unsigned NDIE = 3;

  int checks = 0, failures = 0, ties = 0;
  int n_full_cfg = 0, n_part_cfg = 0, n_ramp = 0, n_zrise = 0, n_bit1 = 0, n_bit0 = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NDIE-1:0] vdd_up, busy, done;
  logic [12:0] vdd_mv [NDIE];
  logic [47:0] chip_id [NDIE];
  logic [3:0]  z [NDIE];
  logic [2:0]  col [NDIE];

  always #5 clk = ~clk;

  for (genvar d = 0; d < NDIE; d++) begin : g_die
    vdd_ramp_model #(.STEP_MV(STEP)) u_sup (.clk(clk), .rst_n(rst_n), .up(vdd_up[d]), .vdd_mv(vdd_mv[d]));
    chip_id_top #(.RAMP_WAIT(W), .DIE_SEED(d + 1)) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .vdd_mv(vdd_mv[d]), .vdd_up(vdd_up[d]),
      .busy(busy[d]), .done(done[d]), .chip_id(chip_id[d]), .z(z[d]), .col(col[d]));
  end

  // mechanism counters, observed on die 0
  int wr_in_phase = 0;
  always @(negedge g_die[0].dut.u_ctrl.we) if (rst_n) wr_in_phase++;
  always @(posedge vdd_up[0]) begin
    #1;
    n_ramp++;
    if (wr_in_phase == 32) n_full_cfg++;
    else if (wr_in_phase == 8) n_part_cfg++;
    else begin failures++; $display("FAIL %0d writes before a ramp", wr_in_phase); end
    wr_in_phase = 0;
  end
  always @(posedge z[0][0] or posedge z[0][1] or posedge z[0][2] or posedge z[0][3]) if (vdd_up[0]) n_zrise++;

  function automatic int sw_step(input int unsigned seed, input int unsigned g);
    return (gate_vth_mv(seed, g) - 3000 + STEP - 1) / STEP;
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (!done[0]) begin @(posedge clk); #1; cycles++; end
    checks++;
    if (cycles != 88 * 3 + 8 * (2 * W + 1)) begin failures++; $display("FAIL read took %0d cycles", cycles); end
    for (int d = 0; d < NDIE; d++) begin
      int k;
      $display("die %0d: ID %012h", d + 1, chip_id[d]);
      for (int c = 0; c < 8; c++) begin
        k = 0;
        for (int i = 0; i < 4; i++)
          for (int j = i + 1; j < 4; j++) begin
            int ti, tj;
            logic b;
            ti = sw_step(d + 1, c * 4 + i);
            tj = sw_step(d + 1, c * 4 + j);
            b = chip_id[d][6 * c + k];
            if (ti == tj) ties++;
            else begin
              checks++;
              if (b !== (tj < ti)) begin
                failures++;
                $display("FAIL die %0d col %0d bit %0d = %0d (steps %0d, %0d)", d + 1, c + 1, k, b, ti, tj);
              end
              if (d == 0) begin if (b) n_bit1++; else n_bit0++; end
            end
            k++;
          end
      end
    end
    for (int a = 0; a < NDIE; a++)
      for (int b = a + 1; b < NDIE; b++) begin
        checks++;
        if (chip_id[a] == chip_id[b]) begin failures++; $display("FAIL dies %0d and %0d share an ID", a + 1, b + 1); end
        $display("Hamming distance die %0d - die %0d: %0d", a + 1, b + 1, $countones(chip_id[a] ^ chip_id[b]));
      end
    $display("full configs=%0d partial reconfigs=%0d ramps=%0d gate switches=%0d bits set=%0d reset=%0d ties=%0d",
             n_full_cfg, n_part_cfg, n_ramp, n_zrise, n_bit1, n_bit0, ties);
    checks += 6;
    if (n_full_cfg != 1) failures++;
    if (n_part_cfg != 7) failures++;
    if (n_ramp != 8) failures++;
    if (n_zrise == 0) failures++;
    if (n_bit1 == 0) failures++;
    if (n_bit0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
