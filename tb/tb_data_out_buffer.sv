// Testbench for data_out_buffer: after reset, random load/data sequences on
// a free-running clock. The output must take the data only at edges with
// load high and hold its value through every other cycle.
module tb_data_out_buffer;
  logic clk = 1'b0, rst_n, load, d, q;
  logic model;
  int checks = 0, failures = 0, holds = 0;

  data_out_buffer dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; d = 1'b1;
    #12 rst_n = 1'b1;
    model = 1'b0;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset value"); end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      load = ($urandom_range(3) == 0);
      d    = 1'($urandom);
      @(posedge clk);
      if (load) model = d;
      else if (d != model) holds++;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d load=%0d d=%0d q=%0d exp=%0d", i, load, d, q, model);
      end
    end
    checks++;
    if (holds == 0) begin failures++; $display("FAIL no hold case exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
