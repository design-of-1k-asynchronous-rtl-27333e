// Row decoder: turns the row address into one-hot word lines R.
//
// Exactly one word line r[addr] is high while en is high; all are low while
// en is low, so no cell is connected to the bitlines during precharge.
// Purely combinational. The enable gating is this design's choice; the
// block itself and its output R are the ones of the SRAM block diagram.
module row_decoder #(
  parameter int unsigned ROWS = sram_pkg::ROWS,
  parameter int unsigned AW   = $clog2(ROWS)
) (
  input  logic            en,
  input  logic [AW-1:0]   addr,
  output logic [ROWS-1:0] r
);

  always_comb begin
    r = '0;
    for (int unsigned i = 0; i < ROWS; i++)
      if (en && addr == AW'(i)) r[i] = 1'b1;
  end

endmodule
