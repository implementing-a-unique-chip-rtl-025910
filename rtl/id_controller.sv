// id_controller - sequencer that reads a 48-bit unclonable ID out of REPOMO32
// by partial reconfiguration (the logic placed in the board's CPLD).
//
// REPOMO32 has only four outputs and no registers, so the ID is read one
// column at a time.  For column k (k = 0..7, i.e. columns 1..8) the four CLEs
// of that column are NAND/NOR gates whose inputs are inverse values (0 and 1)
// and every other CLE is a "wire" (A AND A).  The controller then:
//   1. writes the configuration: all 32 CLEs the first time (column 1 = NAND/
//      NOR, columns 2-8 = wires), afterwards only the 8 CLEs of columns k and
//      k+1 (column k becomes a wire, column k+1 the NAND/NOR column);
//   2. raises vdd_up so the supply ramps 3 V -> 5 V, and waits RAMP_WAIT
//      cycles; meanwhile the S-R latch bank records which gates switched first;
//   3. copies the six latch bits into chip_id[6k+5:6k] (column 1 in the LSBs);
//   4. drops vdd_up and waits RAMP_WAIT cycles for the supply to return.
// After column 8, done pulses for one cycle and chip_id holds the 48-bit ID.
// The procedure, the 32 + 7 x 8 configuration steps and the external ID
// register are those of the method; the clocked implementation, the fixed
// ramp wait (there is no "supply ready" signal), the bit placement in
// chip_id and the routing of 0/1 values (X1..X4 = 0,1,0,1, see repomo_pkg)
// are this design's choices.
//
// Configuration step timing: addr/data are set in one cycle, we is high in
// the next and low again in the third, so addr/data are stable while the
// latches are open: 3 cycles per step.
module id_controller
  import repomo_pkg::*;
#(
  parameter int unsigned RAMP_WAIT = 2048,
  localparam int unsigned NBITS = NROWS * (NROWS - 1) / 2,
  localparam int unsigned IDW   = NBITS * NCOLS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  // REPOMO32 configuration interface and primary inputs
  output logic              we,
  output logic [ADDR_W-1:0] addr,
  output logic [CFG_W-1:0]  data,
  output logic [NROWS-1:0]  x,
  // supply level request: 1 = high Vdd (NAND), 0 = low Vdd (NOR)
  output logic              vdd_up,
  // S-R latch bank
  input  logic [NBITS-1:0]  sr_q,
  // status and result
  output logic              busy,
  output logic              done,
  output logic [2:0]        col,
  output logic [IDW-1:0]    chip_id
);

  typedef enum logic [2:0] {
    S_IDLE, S_CFG, S_RAMP_UP, S_CAPTURE, S_RAMP_DOWN
  } state_e;

  state_e            state;
  logic              first_cfg;            // full 32-step configuration pending
  logic [5:0]        wr_idx;               // configuration step within the phase
  logic [1:0]        wr_phase;             // 0: set addr/data, 1: we high, 2: we low
  logic [$clog2(RAMP_WAIT+1)-1:0] wait_cnt;

  logic [5:0]        wr_count;             // steps of this phase
  logic [ADDR_W-1:0] wr_addr;
  cle_cfg_t          wr_cfg;

  // Step i of a phase writes address base + i; the CLE becomes a NAND/NOR gate
  // if it lies in the current column, a wire otherwise.
  always_comb begin
    logic [ADDR_W-1:0] base;
    base     = first_cfg ? '0 : cle_addr(32'(col) - 1, 0);
    wr_count = first_cfg ? 6'(NCLE) : 6'(2 * NROWS);
    wr_addr  = base + ADDR_W'(wr_idx);
    if (wr_addr[ADDR_W-1:2] == col) wr_cfg = poly_cfg(wr_addr[1:0]);
    else                            wr_cfg = wire_cfg(wr_addr[1:0]);
  end

  assign x    = ID_X_PATTERN;
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      first_cfg <= 1'b1;
      wr_idx    <= '0;
      wr_phase  <= '0;
      wait_cnt  <= '0;
      col       <= '0;
      we        <= 1'b0;
      addr      <= '0;
      data      <= '0;
      vdd_up    <= 1'b0;
      done      <= 1'b0;
      chip_id   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state     <= S_CFG;
            first_cfg <= 1'b1;
            col       <= '0;
            wr_idx    <= '0;
            wr_phase  <= '0;
          end
        end
        S_CFG: begin
          unique case (wr_phase)
            2'd0: begin
              addr     <= wr_addr;
              data     <= wr_cfg;
              wr_phase <= 2'd1;
            end
            2'd1: begin
              we       <= 1'b1;
              wr_phase <= 2'd2;
            end
            default: begin
              we       <= 1'b0;
              wr_phase <= 2'd0;
              if (wr_idx == wr_count - 1) begin
                wr_idx    <= '0;
                first_cfg <= 1'b0;
                state     <= S_RAMP_UP;
                vdd_up    <= 1'b1;
                wait_cnt  <= '0;
              end else begin
                wr_idx <= wr_idx + 1'b1;
              end
            end
          endcase
        end
        S_RAMP_UP: begin
          if (wait_cnt == $bits(wait_cnt)'(RAMP_WAIT - 1)) state <= S_CAPTURE;
          else wait_cnt <= wait_cnt + 1'b1;
        end
        S_CAPTURE: begin
          chip_id[NBITS*col +: NBITS] <= sr_q;
          vdd_up   <= 1'b0;
          wait_cnt <= '0;
          state    <= S_RAMP_DOWN;
        end
        S_RAMP_DOWN: begin
          if (wait_cnt == $bits(wait_cnt)'(RAMP_WAIT - 1)) begin
            if (col == 3'(NCOLS - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              col   <= col + 1'b1;
              state <= S_CFG;
            end
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
