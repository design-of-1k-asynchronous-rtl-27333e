// Shared constants and types of the 1 kbit asynchronous SRAM.
//
// The memory holds 1024 one-bit words arranged as 32 rows by 32 columns;
// the address splits into a 5-bit row field (upper bits) and a 5-bit
// column field (lower bits). The 1 kbit capacity is the design's stated
// size; the 32x32 arrangement, the one-bit word and the address split are
// this design's own choices.
//
// ctrl_t bundles the internal control signals that the self-holding control
// unit produces for the array periphery. state_t names its two phases.
package sram_pkg;

  localparam int unsigned ROWS   = 32;
  localparam int unsigned COLS   = 32;
  localparam int unsigned ROW_AW = $clog2(ROWS);
  localparam int unsigned COL_AW = $clog2(COLS);

  // Internal control signals, all active high.
  typedef struct packed {
    logic precharge;  // bitline pull-ups on
    logic wl_en;      // row decoder may raise a word line
    logic col_en;     // column decoder may select a column
    logic sense_en;   // sense amplifier enabled (read access)
    logic write_en;   // write driver enabled (write access)
    logic din_load;   // data in buffer captures DataIn at this edge
    logic dout_load;  // data out buffer captures the sensed bit at this edge
  } ctrl_t;

  typedef enum logic {
    ST_PRECHARGE = 1'b0,  // bitlines pulled up, waiting for chip select
    ST_ACCESS    = 1'b1   // word line and column on, sense or write
  } state_t;

endpackage
