// Data in buffer.
//
// Captures DataIn at the rising clk edge on which load is high (the control
// unit accepting an operation) and holds it for the write driver, so DataIn
// may change right after that edge. Reset clears it to 0.
module data_in_buffer (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    q <= 1'b0;
    else if (load) q <= d;

endmodule
