// tb_chip_id_21dies - the evaluation workload of the ID scheme on 21
// simulated dies (DIE_SEED 1..21, like chips A..U), all other parameters at
// their defaults.  Each die reads its 48-bit ID once.  Checked: every ID bit
// whose pair of gates switches at different voltages matches the switching
// order; all 21 IDs are distinct.  Reported: the average pairwise Hamming
// distance (ideal 24 of 48), the ratio of ones to zeros, and the shortest
// prefix length (in bits, column 1 first) that already tells all dies apart.
// The gate model has no noise, so repeated reads of one die are identical
// and the unstable-bit measurement does not apply.
module tb_chip_id_21dies;
  import repomo_pkg::*;
  localparam int unsigned NDIE = 21;
  int checks = 0, failures = 0, ties = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NDIE-1:0] vdd_up, busy, done;
  logic [12:0] vdd_mv [NDIE];
  logic [47:0] chip_id [NDIE];
  logic [3:0]  z [NDIE];
  logic [2:0]  col [NDIE];

  always #5 clk = ~clk;

  for (genvar d = 0; d < NDIE; d++) begin : g_die
    vdd_ramp_model u_sup (.clk(clk), .rst_n(rst_n), .up(vdd_up[d]), .vdd_mv(vdd_mv[d]));
    chip_id_top #(.DIE_SEED(d + 1)) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .vdd_mv(vdd_mv[d]), .vdd_up(vdd_up[d]),
      .busy(busy[d]), .done(done[d]), .chip_id(chip_id[d]), .z(z[d]), .col(col[d]));
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hd_sum, npairs, ones, bits;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (done !== '1) @(posedge clk);
    #1;
    ones = 0;
    for (int d = 0; d < NDIE; d++) begin
      int k;
      $display("die %0d: ID %012h", d + 1, chip_id[d]);
      ones += $countones(chip_id[d]);
      for (int c = 0; c < 8; c++) begin
        k = 0;
        for (int i = 0; i < 4; i++)
          for (int j = i + 1; j < 4; j++) begin
            int vi, vj;
            vi = gate_vth_mv(d + 1, c * 4 + i);
            vj = gate_vth_mv(d + 1, c * 4 + j);
            if (vi == vj) ties++;
            else begin
              checks++;
              if (chip_id[d][6 * c + k] !== (vj < vi)) begin
                failures++;
                $display("FAIL die %0d column %0d bit %0d", d + 1, c + 1, k);
              end
            end
            k++;
          end
      end
    end
    hd_sum = 0; npairs = 0;
    for (int a = 0; a < NDIE; a++)
      for (int b = a + 1; b < NDIE; b++) begin
        checks++;
        if (chip_id[a] == chip_id[b]) begin failures++; $display("FAIL dies %0d and %0d collide", a + 1, b + 1); end
        hd_sum += $countones(chip_id[a] ^ chip_id[b]);
        npairs++;
      end
    // shortest ID prefix without collisions
    for (bits = 1; bits <= 48; bits++) begin
      logic clash;
      clash = 1'b0;
      for (int a = 0; a < NDIE; a++)
        for (int b = a + 1; b < NDIE; b++)
          if (((chip_id[a] ^ chip_id[b]) & ((48'd1 << bits) - 48'd1)) == '0) clash = 1'b1;
      if (!clash) break;
    end
    $display("average Hamming distance %0d.%02d of 48 bits over %0d pairs",
             hd_sum / npairs, (hd_sum * 100 / npairs) % 100, npairs);
    $display("ones %0d, zeros %0d; shortest collision-free prefix %0d bits; unchecked equal-voltage pairs %0d",
             ones, NDIE * 48 - ones, bits, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
