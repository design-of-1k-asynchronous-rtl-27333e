// Column multiplexer between the bitline pairs and the data lines.
//
// The data lines DATAP/DATAN are precharged high and pulled low through the
// selected column: DATAP follows BL and DATAN follows BLB of the column whose
// select c[i] is high. When the write driver pulls one data line low
// (wr_pd_p or wr_pd_n) it overpowers the cell, the data lines take the
// driver's levels, and the selected column gets its write strobe col_we with
// wbit = DATAP as the bit forced into the cell. Combinational.
module column_mux #(
  parameter int unsigned COLS = sram_pkg::COLS
) (
  input  logic [COLS-1:0] c,
  input  logic [COLS-1:0] bl,
  input  logic [COLS-1:0] blb,
  input  logic            wr_pd_p,
  input  logic            wr_pd_n,
  output logic            datap,
  output logic            datan,
  output logic [COLS-1:0] col_we,
  output logic            wbit
);

  logic driving;

  always_comb begin
    driving = wr_pd_p | wr_pd_n;
    if (driving) begin
      datap = ~wr_pd_p;
      datan = ~wr_pd_n;
    end else begin
      datap = ~|(c & ~bl);
      datan = ~|(c & ~blb);
    end
    col_we = driving ? c : '0;
    wbit   = datap;
  end

endmodule
