// Testbench for row_decoder: applies every address with the enable high and
// low and compares the word lines with a one-hot vector built by shifting.
module tb_row_decoder;
  localparam int unsigned ROWS = 32;
  localparam int unsigned AW   = 5;

  logic            en;
  logic [AW-1:0]   addr;
  logic [ROWS-1:0] r;
  int checks = 0, failures = 0;

  row_decoder #(.ROWS(ROWS), .AW(AW)) dut (.en, .addr, .r);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < ROWS; a++) begin
        logic [ROWS-1:0] exp;
        en = e[0]; addr = AW'(a);
        #1;
        exp = e[0] ? (ROWS'(1) << a) : '0;
        checks++;
        if (r !== exp) begin
          failures++;
          $display("FAIL en=%0d addr=%0d r=%h exp=%h", e, a, r, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
