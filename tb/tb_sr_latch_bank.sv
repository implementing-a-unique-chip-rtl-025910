// tb_sr_latch_bank - checks the six S-R arbiter latches on Z0..Z3.
// Each trial raises the four inputs in a random order (with random ties), as
// the gate outputs do during a supply ramp, then lowers them again.  Bit k of
// the pair (i, j), in the order (0,1) (0,2) (0,3) (1,2) (1,3) (2,3), must be 1
// when input j rose before input i, 0 when i rose first, and keep its previous
// value when both rose together.
module tb_sr_latch_bank;
  int checks = 0, failures = 0;
  int ones = 0, zeros = 0, ties = 0;
  logic [3:0] z;
  logic [5:0] q;

  sr_latch_bank dut (.z(z), .q(q));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t [4];
    int k;
    logic [5:0] expq, prevq;
    z = 4'b0000;
    // establish a known state: Z1 alone high sets bit 0 etc.
    z = 4'b1111; #1;
    z = 4'b0000; #1;
    z = 4'b0001; #1;           // Z0 first: reset all latches with R = Z0
    z = 4'b0011; #1;           // Z1 before Z2, Z3
    z = 4'b0111; #1;           // Z2 before Z3
    z = 4'b1111; #1;
    checks++;
    if (q !== 6'b000000) begin failures++; $display("FAIL init q=%b", q); end
    prevq = q;
    for (int n = 0; n < 2000; n++) begin
      z = 4'b0000; #1;
      // latches may be disturbed by the falling edges: read back as previous
      prevq = q;
      for (int i = 0; i < 4; i++) t[i] = $urandom_range(0, 5);
      for (int step = 0; step <= 5; step++) begin
        for (int i = 0; i < 4; i++) if (t[i] == step) z[i] = 1'b1;
        #1;
      end
      k = 0;
      for (int i = 0; i < 4; i++)
        for (int j = i + 1; j < 4; j++) begin
          if (t[j] < t[i]) begin expq[k] = 1'b1; ones++; end
          else if (t[i] < t[j]) begin expq[k] = 1'b0; zeros++; end
          else begin expq[k] = prevq[k]; ties++; end
          k++;
        end
      checks++;
      if (q !== expq) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d,%0d,%0d,%0d q=%b exp=%b", t[0], t[1], t[2], t[3], q, expq);
      end
    end
    $display("bits set=%0d reset=%0d ties=%0d", ones, zeros, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
