// Column decoder: turns the column address into one-hot column selects C.
//
// Exactly one select c[addr] is high while en is high, none while en is low.
// The selects steer the column multiplexer. Purely combinational; the
// enable gating is this design's choice.
module column_decoder #(
  parameter int unsigned COLS = sram_pkg::COLS,
  parameter int unsigned AW   = $clog2(COLS)
) (
  input  logic            en,
  input  logic [AW-1:0]   addr,
  output logic [COLS-1:0] c
);

  always_comb begin
    c = '0;
    for (int unsigned i = 0; i < COLS; i++)
      if (en && addr == AW'(i)) c[i] = 1'b1;
  end

endmodule
