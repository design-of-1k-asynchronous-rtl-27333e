// Data out buffer.
//
// Captures the sensed bit at the rising clk edge on which load is high and
// holds it on OUTPUT until the next read loads a new bit: writes, idle
// cycles and chip deselect leave it unchanged. Because the output holds
// itself, no output-enable input is needed. Reset clears it to 0.
module data_out_buffer (
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
