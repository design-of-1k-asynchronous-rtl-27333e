// Sense amplifier.
//
// While se is high it resolves the data line pair: q is DATAP (0 while se is
// low, the amplifier being off), and valid is
// high once DATAP and DATAN differ, meaning a cell has developed a
// differential. With both lines still high (precharged) or se low, valid
// stays low. valid is the completion signal the control unit waits for
// before it latches the output. The analog amplifier is represented only by
// this logic effect. Combinational.
module sense_amp (
  input  logic se,
  input  logic datap,
  input  logic datan,
  output logic q,
  output logic valid
);

  always_comb begin
    q     = se & datap;
    valid = se & (datap ^ datan);
  end

endmodule
