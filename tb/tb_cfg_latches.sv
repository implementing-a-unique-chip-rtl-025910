// tb_cfg_latches - checks the 32 x 8-bit configuration latches: every latch
// written once, then random writes; after each write all 32 outputs must match
// a shadow copy kept here.  Also checks that the addressed latch is transparent
// while we is high and holds once we is low, even when data then changes.
module tb_cfg_latches;
  import repomo_pkg::*;
  int checks = 0, failures = 0;
  logic       we;
  logic [4:0] addr;
  logic [7:0] data;
  logic [7:0] cfg [32];
  logic [7:0] shadow [32];

  cfg_latches dut (.we(we), .addr(addr), .data(data), .cfg(cfg));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic [4:0] a, input logic [7:0] d);
    addr = a; data = d; #1;
    we = 1'b1; #1;
    // transparent while we is high
    data = ~d; #1;
    checks++;
    if (cfg[a] !== ~d) begin failures++; $display("FAIL latch %0d not transparent", a); end
    data = d; #1;
    we = 1'b0; #1;
    data = 8'($urandom); addr = 5'($urandom); #1;   // must not disturb anything
    shadow[a] = d;
  endtask

  task automatic check_all();
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (cfg[i] !== shadow[i]) begin
        failures++;
        if (failures < 10) $display("FAIL cfg[%0d]=%02h exp %02h", i, cfg[i], shadow[i]);
      end
    end
  endtask

  initial begin
    we = 0; addr = 0; data = 0;
    for (int i = 0; i < 32; i++) write(5'(i), 8'($urandom));
    check_all();
    for (int n = 0; n < 500; n++) begin
      write(5'($urandom), 8'($urandom));
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
