// tb_cle - exhaustive self-checking test of one Configurable Logic Element.
// Every configuration byte, every value of the eight multiplexer inputs and
// both polymorphic states are applied; the expected output is computed here
// from the configuration fields (A = bits 7:5, B = bits 4:2, function = bits
// 1:0 with 0 AND, 1 OR, 2 XOR, 3 NOR at low Vdd / NAND at high Vdd).
module tb_cle;
  import repomo_pkg::*;

  int checks = 0, failures = 0;
  int fn_seen [4];
  logic [7:0] cfg_b;
  logic [3:0] near_in, far_in;
  logic       poly_nand, y;

  cle dut (.cfg(cle_cfg_t'(cfg_b)), .near_in(near_in), .far_in(far_in), .poly_nand(poly_nand), .y(y));

  function automatic logic pick(input logic [2:0] s, input logic [3:0] n, input logic [3:0] f);
    return (s < 4) ? n[s[1:0]] : f[s[1:0]];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, b, exp;
    for (int c = 0; c < 256; c++)
      for (int v = 0; v < 256; v++)
        for (int p = 0; p < 2; p++) begin
          cfg_b = 8'(c); near_in = 4'(v); far_in = 4'(v >> 4); poly_nand = p[0];
          #1;
          a = pick(cfg_b[7:5], near_in, far_in);
          b = pick(cfg_b[4:2], near_in, far_in);
          case (cfg_b[1:0])
            2'd0: exp = a & b;
            2'd1: exp = a | b;
            2'd2: exp = a ^ b;
            default: exp = p[0] ? !(a && b) : !(a || b);
          endcase
          checks++;
          fn_seen[cfg_b[1:0]]++;
          if (y !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL cfg=%02h near=%h far=%h poly=%0d y=%0d exp=%0d", cfg_b, near_in, far_in, p, y, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
