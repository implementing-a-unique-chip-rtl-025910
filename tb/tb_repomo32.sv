// tb_repomo32 - checks the 4 x 8 polymorphic array through its configuration
// interface.  Random configurations are written with we pulses, then random
// primary inputs and polymorphic-gate states are applied; Z0..Z3 are compared
// with a reference evaluation of the array done here column by column (CLE in
// column c takes inputs 0..3 from column c-1 and 4..7 from column c-2, with
// X1..X4 standing in for missing columns).  A second part writes the ID
// procedure's settings (one column of NAND/NOR gates, all others wires) and
// checks that each gate output reaches its Z pin: NOR (0) at low Vdd, NAND (1)
// at high Vdd.
module tb_repomo32;
  import repomo_pkg::*;
  int checks = 0, failures = 0;
  logic       we;
  logic [4:0] addr;
  logic [7:0] data;
  logic [3:0] x, z;
  logic [31:0] poly_nand;
  logic [7:0] shadow [32];

  repomo32 dut (.we(we), .addr(addr), .data(data), .x(x), .poly_nand(poly_nand), .z(z));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int a, input logic [7:0] d);
    addr = 5'(a); data = d; #1;
    we = 1'b1; #1;
    we = 1'b0; #1;
    shadow[a] = d;
  endtask

  function automatic logic [3:0] ref_z(input logic [3:0] xi, input logic [31:0] pn);
    logic [3:0] colv [8];
    logic [3:0] nr, fr;
    logic [7:0] c;
    logic a, b, y;
    for (int col = 0; col < 8; col++) begin
      nr = (col == 0) ? xi : colv[col-1];
      fr = (col <= 1) ? xi : colv[col-2];
      for (int r = 0; r < 4; r++) begin
        c = shadow[col*4 + r];
        a = c[7] ? fr[c[6:5]] : nr[c[6:5]];
        b = c[4] ? fr[c[3:2]] : nr[c[3:2]];
        case (c[1:0])
          2'd0: y = a & b;
          2'd1: y = a | b;
          2'd2: y = a ^ b;
          default: y = pn[col*4 + r] ? ~(a & b) : ~(a | b);
        endcase
        colv[col][r] = y;
      end
    end
    return colv[7];
  endfunction

  task automatic check_z(input logic [3:0] exp, input string what);
    checks++;
    if (z !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s z=%b exp=%b", what, z, exp);
    end
  endtask

  initial begin
    we = 0; addr = 0; data = 0; x = 0; poly_nand = 0;
    for (int n = 0; n < 300; n++) begin
      if (n == 0) for (int i = 0; i < 32; i++) write(i, 8'($urandom));
      else for (int k = 0; k < 4; k++) write($urandom_range(0, 31), 8'($urandom));
      for (int v = 0; v < 16; v++) begin
        x = 4'($urandom); poly_nand = $urandom; #1;
        check_z(ref_z(x, poly_nand), "random");
      end
    end
    // ID procedure settings: column k NAND/NOR, rest wires, X = 0,1,0,1
    x = 4'b1010;
    for (int k = 0; k < 8; k++) begin
      for (int i = 0; i < 32; i++)
        write(i, (i / 4 == k) ? 8'(poly_cfg(2'(i % 4))) : 8'(wire_cfg(2'(i % 4))));
      poly_nand = '0; #1;
      check_z(4'b0000, "id low Vdd");
      poly_nand = '1; #1;
      check_z(4'b1111, "id high Vdd");
      for (int r = 0; r < 4; r++) begin
        poly_nand = '0; poly_nand[k*4 + r] = 1'b1; #1;
        check_z(4'(1 << r), "id one gate switched");
        // a gate outside the NAND/NOR column has no effect
        poly_nand = '1; poly_nand[k*4 + r] = 1'b0; #1;
        check_z(~4'(1 << r), "id one gate unswitched");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
