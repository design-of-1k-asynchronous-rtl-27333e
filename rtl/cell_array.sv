// Cell array: ROWS x COLS one-bit storage cells.
//
// Read: each cell on a raised word line pulls one line of its column's
// bitline pair low, BL when it stores 0 and BLB when it stores 1. The
// outputs bl_pd/blb_pd are those pull-downs; the bitline pull-up block turns
// them into levels. With no word line raised nothing is pulled.
//
// Write: at the rising clk edge, every cell whose word line wl[r] and column
// strobe col_we[c] are both high takes wbit. The real cells are static
// latches; here they are clocked bits written at the edge that ends an
// access, which is this design's choice. Cells are not reset, like a real
// SRAM whose power-up content is undefined.
module cell_array #(
  parameter int unsigned ROWS = sram_pkg::ROWS,
  parameter int unsigned COLS = sram_pkg::COLS
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wl,
  input  logic [COLS-1:0] col_we,
  input  logic            wbit,
  output logic [COLS-1:0] bl_pd,
  output logic [COLS-1:0] blb_pd
);

  logic [COLS-1:0] cells [ROWS];

  always_ff @(posedge clk) begin
    for (int unsigned r = 0; r < ROWS; r++)
      for (int unsigned c = 0; c < COLS; c++)
        if (wl[r] && col_we[c]) cells[r][c] <= wbit;
  end

  always_comb begin
    bl_pd  = '0;
    blb_pd = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      if (wl[r]) begin
        bl_pd  = bl_pd  | ~cells[r];
        blb_pd = blb_pd |  cells[r];
      end
  end

endmodule
