// Testbench for column_decoder: applies every address with the enable high and
// low and compares the column selects with a one-hot vector built by shifting.
module tb_column_decoder;
  localparam int unsigned COLS = 32;
  localparam int unsigned AW   = 5;

  logic            en;
  logic [AW-1:0]   addr;
  logic [COLS-1:0] c;
  int checks = 0, failures = 0;

  column_decoder #(.COLS(COLS), .AW(AW)) dut (.en, .addr, .c);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < COLS; a++) begin
        logic [COLS-1:0] exp;
        en = e[0]; addr = AW'(a);
        #1;
        exp = e[0] ? (COLS'(1) << a) : '0;
        checks++;
        if (c !== exp) begin
          failures++;
          $display("FAIL en=%0d addr=%0d c=%h exp=%h", e, a, c, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
