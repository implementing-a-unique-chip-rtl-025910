// tb_polygate_vdd_model - checks the Vdd-controlled NAND/NOR state model: NOR
// (0) below the gate's threshold, NAND (1) at and above it, for two gates with
// different thresholds swept over 3.0-5.0 V in both directions.
module tb_polygate_vdd_model;
  int checks = 0, failures = 0;
  logic [12:0] vdd_mv;
  logic m_a, m_b;

  polygate_vdd_model #(.VTH_MV(3850)) u_a (.vdd_mv(vdd_mv), .nand_mode(m_a));
  polygate_vdd_model #(.VTH_MV(3812)) u_b (.vdd_mv(vdd_mv), .nand_mode(m_b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_at(input int mv);
    vdd_mv = 13'(mv);
    #1;
    checks += 2;
    if (m_a !== (mv >= 3850)) begin failures++; $display("FAIL a at %0d mV: %0d", mv, m_a); end
    if (m_b !== (mv >= 3812)) begin failures++; $display("FAIL b at %0d mV: %0d", mv, m_b); end
  endtask

  initial begin
    int first_a, first_b;
    first_a = -1; first_b = -1;
    for (int mv = 3000; mv <= 5000; mv++) begin
      check_at(mv);
      if (m_a && first_a < 0) first_a = mv;
      if (m_b && first_b < 0) first_b = mv;
    end
    for (int mv = 5000; mv >= 3000; mv -= 7) check_at(mv);
    // the documented ranges: NOR everywhere in 3.0-3.8 V, NAND in 3.9-5.0 V
    checks += 2;
    if (first_a != 3850) failures++;
    if (first_b != 3812) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
