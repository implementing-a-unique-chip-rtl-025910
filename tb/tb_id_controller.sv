// tb_id_controller - checks the ID read sequence of the controller against a
// model of the array's configuration store kept here.
//  * the first phase writes all 32 CLEs, each later phase exactly 8;
//  * before each supply ramp, column k holds NAND/NOR settings and every other
//    CLE the wire setting, and X1..X4 = 0,1,0,1;
//  * addr and data do not change while we is high;
//  * vdd_up stays high for RAMP_WAIT + 1 cycles per column, 8 times;
//  * a per-column pattern offered on sr_q while Vdd is high ends up in
//    chip_id[6k+5:6k];
//  * the whole read takes 88*3 + 8*(2*RAMP_WAIT + 1) cycles from start.
module tb_id_controller;
  import repomo_pkg::*;
  localparam int unsigned W = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic we, vdd_up, busy, done;
  logic [4:0] addr;
  logic [7:0] data;
  logic [3:0] x;
  logic [5:0] sr_q;
  logic [2:0] col;
  logic [47:0] chip_id;
  logic [7:0] shadow [32];
  logic [47:0] exp_id;
  int writes_in_phase = 0, phase = 0, high_cycles = 0, ramps = 0;

  id_controller #(.RAMP_WAIT(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [5:0] pattern(input int k, input int run);
    return 6'((k * 37 + 11 + run * 5) ^ (k << 3));
  endfunction

  task automatic fail(input string m);
    failures++;
    if (failures < 15) $display("FAIL %s (t=%0t)", m, $time);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // configuration store model: latch on the falling edge of we
  logic [4:0] addr_at_we;
  logic [7:0] data_at_we;
  always @(posedge we) begin addr_at_we = addr; data_at_we = data; end
  always @(negedge we) if (rst_n) begin
    checks++;
    if (addr !== addr_at_we || data !== data_at_we) fail("addr/data changed while we high");
    shadow[addr] = data;
    writes_in_phase++;
  end

  int run = 0;
  // at each rising vdd_up: check the configuration and the write count
  always @(posedge vdd_up) begin
    #1;   // let the last write of the phase (same clock edge) land first
    checks += 3;
    if (writes_in_phase != ((phase == 0) ? 32 : 8)) fail($sformatf("phase %0d wrote %0d CLEs", phase, writes_in_phase));
    if (col != 3'(phase)) fail("column number");
    if (x !== 4'b1010) fail("primary inputs");
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (shadow[i] !== ((i / 4 == phase) ? 8'(poly_cfg(2'(i % 4))) : 8'(wire_cfg(2'(i % 4)))))
        fail($sformatf("phase %0d CLE %0d cfg %02h", phase, i, shadow[i]));
    end
    writes_in_phase = 0;
    sr_q = pattern(phase, run);
    exp_id[6*phase +: 6] = pattern(phase, run);
  end
  always @(negedge vdd_up) begin
    if (rst_n) begin
      checks++;
      if (high_cycles != W + 1) fail($sformatf("vdd_up high for %0d cycles", high_cycles));
      ramps++;
      phase++;
      #1 sr_q = 6'($urandom);     // latches disturbed while Vdd falls
    end
  end
  always @(posedge clk) begin
    if (vdd_up) high_cycles++;
    else high_cycles = 0;
  end

  initial begin
    int cycles;
    sr_q = 6'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (run = 0; run < 2; run++) begin
      phase = 0; ramps = 0; writes_in_phase = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 0;   // start was sampled on the edge just passed
      while (!done) begin @(posedge clk); #1; cycles++; end
      checks += 4;
      if (cycles != 88 * 3 + 8 * (2 * W + 1)) fail($sformatf("read took %0d cycles", cycles));
      if (ramps != 8) fail($sformatf("%0d ramps", ramps));
      if (chip_id !== exp_id) fail($sformatf("chip_id %012h exp %012h", chip_id, exp_id));
      @(posedge clk); #1;
      if (done || busy) fail("done not a pulse / still busy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
