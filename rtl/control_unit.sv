// Self-holding control unit.
//
// The control unit turns the two user controls, chip select CSNB and write
// enable WENB (both active low), into the internal sequence of one access,
// so that the user never has to drive sense-enable or output-enable timing.
//
// It alternates between two phases, one clk cycle each at least:
//   PRECHARGE  bitline pull-ups on, no word line. At the rising edge on
//              which CSNB is low the operation is accepted: the address and
//              the read/write choice are captured here and DataIn in the
//              data in buffer (din_load), so none of them has to be held
//              after that edge.
//   ACCESS     pull-ups off, the word line and column of the captured
//              address on, and either the sense amplifier (read) or the
//              write driver (write) enabled. The phase ends at the first
//              edge at which the active block reports completion:
//              sense_valid for a read, write_ack for a write. On a read the
//              same edge loads the sensed bit into the data out buffer
//              (dout_load), which then holds it by itself.
// An operation therefore takes two cycles, and with CSNB held low
// operations follow back to back. The completion handshake follows the
// arrows from the write and sense blocks to the control circuits in the
// SRAM block diagram; the two-phase sequence and the clocked capture are
// this design's reading of "self-holding" control, whose circuit is not
// published.
module control_unit
  import sram_pkg::*;
#(
  parameter int unsigned ROW_W = sram_pkg::ROW_AW,
  parameter int unsigned COL_W = sram_pkg::COL_AW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             csnb,
  input  logic             wenb,
  input  logic [ROW_W-1:0] row_addr_in,
  input  logic [COL_W-1:0] col_addr_in,
  input  logic             sense_valid,
  input  logic             write_ack,
  output logic [ROW_W-1:0] row_addr,
  output logic [COL_W-1:0] col_addr,
  output ctrl_t            ctrl
);

  state_t state, state_nxt;
  logic   is_write;   // captured operation is a write
  logic   accept;     // operation accepted at this edge
  logic   done;       // access phase completes at this edge

  always_comb begin
    accept = (state == ST_PRECHARGE) && !csnb;
    done   = (state == ST_ACCESS) && (is_write ? write_ack : sense_valid);

    ctrl           = '0;
    ctrl.precharge = (state == ST_PRECHARGE);
    ctrl.wl_en     = (state == ST_ACCESS);
    ctrl.col_en    = (state == ST_ACCESS);
    ctrl.sense_en  = (state == ST_ACCESS) && !is_write;
    ctrl.write_en  = (state == ST_ACCESS) &&  is_write;
    ctrl.din_load  = accept && !wenb;
    ctrl.dout_load = done && !is_write;

    state_nxt = state;
    if (accept) state_nxt = ST_ACCESS;
    if (done)   state_nxt = ST_PRECHARGE;

  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_PRECHARGE;
      is_write <= 1'b0;
      row_addr <= '0;
      col_addr <= '0;
    end else begin
      state <= state_nxt;
      if (accept) begin
        is_write <= !wenb;
        row_addr <= row_addr_in;
        col_addr <= col_addr_in;
      end
    end
  end

  // Precharge and word line must never be on together.
  assert property (@(posedge clk) disable iff (!rst_n) !(ctrl.precharge && ctrl.wl_en));
  // Sense and write are never enabled together.
  assert property (@(posedge clk) disable iff (!rst_n) !(ctrl.sense_en && ctrl.write_en));

endmodule
