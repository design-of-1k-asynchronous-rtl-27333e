// 1 kbit asynchronous SRAM with self-holding control.
//
// 1024 one-bit words in a 32 x 32 cell array. The user presents an address,
// WENB (low = write) and, for a write, DataIn, and pulls CSNB low. The
// control unit accepts the request at the next rising clk edge, captures
// address, operation and data, and from then on runs the access on its own:
// precharge of the bitlines, word line and column select, then either the
// sense amplifier or the write driver, ending when that block reports
// completion. A read leaves its bit on dout, held there by the data out
// buffer until the next read; there is no sense-enable or output-enable pin.
//
// Data path (as in the classic SRAM block diagram):
//   addr[9:5] -> row decoder -> word lines R -> cell array
//   addr[4:0] -> column decoder -> selects C -> column multiplexer
//   cell array pull-downs -> bitline pull-up -> bitline pairs -> multiplexer
//   multiplexer DATAP/DATAN <-> write driver (from data in buffer)
//                           ->  sense amplifier -> data out buffer -> dout
//
// Timing: request sampled at edge k (CSNB low), access during cycle k..k+1,
// read data on dout after edge k+1 and write committed at edge k+1; with
// CSNB held low a new request is sampled at edge k+2. One operation per two
// clk cycles. The 1 kbit size, the blocks and the pins CSNB, WENB, DataIn
// and OUTPUT follow the design; the organisation, address split, the clk
// used by the control unit and the two-cycle sequence are this design's own.
module sram_1k #(
  parameter int unsigned ROWS = sram_pkg::ROWS,
  parameter int unsigned COLS = sram_pkg::COLS,
  parameter int unsigned RAW  = $clog2(ROWS),
  parameter int unsigned CAW  = $clog2(COLS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             csnb,
  input  logic             wenb,
  input  logic [RAW+CAW-1:0] addr,
  input  logic             din,
  output logic             dout
);

  sram_pkg::ctrl_t ctrl;
  logic [RAW-1:0]  row_addr;
  logic [CAW-1:0]  col_addr;
  logic [ROWS-1:0] wl;
  logic [COLS-1:0] csel;
  logic [COLS-1:0] bl_pd, blb_pd, bl, blb, col_we;
  logic            datap, datan, wbit;
  logic            din_q, pd_p, pd_n, write_ack;
  logic            sense_q, sense_valid;

  control_unit #(.ROW_W(RAW), .COL_W(CAW)) u_ctrl (
    .clk, .rst_n, .csnb, .wenb,
    .row_addr_in(addr[RAW+CAW-1:CAW]),
    .col_addr_in(addr[CAW-1:0]),
    .sense_valid, .write_ack,
    .row_addr, .col_addr, .ctrl
  );

  row_decoder #(.ROWS(ROWS), .AW(RAW)) u_rowdec (
    .en(ctrl.wl_en), .addr(row_addr), .r(wl)
  );

  column_decoder #(.COLS(COLS), .AW(CAW)) u_coldec (
    .en(ctrl.col_en), .addr(col_addr), .c(csel)
  );

  cell_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .wl, .col_we, .wbit, .bl_pd, .blb_pd
  );

  bitline_pullup #(.COLS(COLS)) u_pullup (
    .pre_en(ctrl.precharge), .bl_pd, .blb_pd, .bl, .blb
  );

  column_mux #(.COLS(COLS)) u_mux (
    .c(csel), .bl, .blb, .wr_pd_p(pd_p), .wr_pd_n(pd_n),
    .datap, .datan, .col_we, .wbit
  );

  data_in_buffer u_dinbuf (
    .clk, .rst_n, .load(ctrl.din_load), .d(din), .q(din_q)
  );

  write_driver u_wdrv (
    .we(ctrl.write_en), .din(din_q), .datap, .datan,
    .pd_p, .pd_n, .write_ack
  );

  sense_amp u_sa (
    .se(ctrl.sense_en), .datap, .datan, .q(sense_q), .valid(sense_valid)
  );

  data_out_buffer u_doutbuf (
    .clk, .rst_n, .load(ctrl.dout_load), .d(sense_q), .q(dout)
  );

  // At most one word line and one column select are ever active.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wl));
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(csel));

endmodule
