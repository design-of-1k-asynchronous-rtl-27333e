// Write driver.
//
// During a write access (we high) it pulls DATAP low to write a 0 or DATAN
// low to write a 1, taking the bit from the data in buffer. It watches the
// data lines and raises write_ack once they carry the complementary levels
// that the bit needs; the control unit uses write_ack as the completion of
// the write. Combinational. The completion feedback follows the arrow from
// the write block to the control circuits in the SRAM block diagram; the
// circuit is this design's own.
module write_driver (
  input  logic we,
  input  logic din,
  input  logic datap,
  input  logic datan,
  output logic pd_p,
  output logic pd_n,
  output logic write_ack
);

  always_comb begin
    pd_p      = we & ~din;
    pd_n      = we &  din;
    write_ack = we & (datap == din) & (datan == ~din);
  end

endmodule
