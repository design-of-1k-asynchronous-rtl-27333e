// Bitline pull-up (precharge) circuitry.
//
// Every bitline is pulled up. While pre_en is high the pull-ups are strong
// and hold both lines of every pair high whatever the cells do; while it is
// low a line stays high unless a cell pulls it low. The analog pull-up is
// represented only by this logic effect: a pair reading 1/1 carries no data,
// a pair reading 1/0 or 0/1 carries a cell's value. Combinational.
module bitline_pullup #(
  parameter int unsigned COLS = sram_pkg::COLS
) (
  input  logic            pre_en,
  input  logic [COLS-1:0] bl_pd,
  input  logic [COLS-1:0] blb_pd,
  output logic [COLS-1:0] bl,
  output logic [COLS-1:0] blb
);

  always_comb begin
    bl  = {COLS{pre_en}} | ~bl_pd;
    blb = {COLS{pre_en}} | ~blb_pd;
  end

endmodule
