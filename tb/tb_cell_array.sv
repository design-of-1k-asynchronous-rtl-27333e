// Testbench for cell_array: writes a random pattern into every cell one
// cell at a time (one word line, one column strobe), then raises each word
// line alone and checks that the row's pull-downs show the stored bits: BL
// pulled for a 0, BLB pulled for a 1. Also checks that nothing is pulled
// with no word line raised, and that a word line without a column strobe
// writes nothing.
module tb_cell_array;
  localparam int unsigned ROWS = 32;
  localparam int unsigned COLS = 32;

  logic            clk = 1'b0;
  logic [ROWS-1:0] wl;
  logic [COLS-1:0] col_we, bl_pd, blb_pd;
  logic            wbit;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  cell_array #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .wl, .col_we, .wbit, .bl_pd, .blb_pd);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row(int r);
    @(negedge clk);
    wl = ROWS'(1) << r; col_we = '0;
    #1;
    checks++;
    if (bl_pd !== ~model[r] || blb_pd !== model[r]) begin
      failures++;
      $display("FAIL row %0d bl_pd=%h blb_pd=%h exp cells=%h", r, bl_pd, blb_pd, model[r]);
    end
  endtask

  initial begin
    wl = '0; col_we = '0; wbit = 1'b0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        wl = ROWS'(1) << r; col_we = COLS'(1) << c; wbit = 1'($urandom);
        model[r][c] = wbit;
        @(posedge clk);
      end
    @(negedge clk);
    wl = '0; col_we = '0;
    #1;
    checks++;
    if (bl_pd !== '0 || blb_pd !== '0) begin failures++; $display("FAIL pulled with no word line"); end
    for (int r = 0; r < ROWS; r++) check_row(r);
    // word line raised with inverted data but no column strobe: no change
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wl = ROWS'(1) << r; col_we = '0; wbit = ~model[r][0];
      @(posedge clk);
    end
    for (int r = 0; r < ROWS; r++) check_row(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
