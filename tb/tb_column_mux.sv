// Testbench for column_mux: random bitline levels with each single column
// selected, no column selected, and the write driver pulling either data
// line. Read: the data lines must copy the selected pair (both high with no
// column). Write: the lines take the driver's levels and only the selected
// column gets a write strobe, carrying the driven bit.
module tb_column_mux;
  localparam int unsigned COLS = 32;

  logic [COLS-1:0] c, bl, blb, col_we;
  logic            wr_pd_p, wr_pd_n, datap, datan, wbit;
  int checks = 0, failures = 0;

  column_mux #(.COLS(COLS)) dut (.c, .bl, .blb, .wr_pd_p, .wr_pd_n,
                                 .datap, .datan, .col_we, .wbit);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      int sel;
      int mode;
      logic e_p, e_n;
      logic [COLS-1:0] e_we;
      sel  = $urandom_range(COLS);       // COLS means no column selected
      mode = $urandom_range(2);          // 0 read, 1 write 0, 2 write 1
      c    = (sel == COLS) ? '0 : (COLS'(1) << sel);
      bl   = $urandom;
      blb  = $urandom;
      wr_pd_p = (mode == 1);
      wr_pd_n = (mode == 2);
      #1;
      if (mode == 0) begin
        e_p  = (sel == COLS) ? 1'b1 : bl[sel];
        e_n  = (sel == COLS) ? 1'b1 : blb[sel];
        e_we = '0;
      end else begin
        e_p  = (mode == 2);
        e_n  = (mode == 1);
        e_we = c;
      end
      checks++;
      if (datap !== e_p || datan !== e_n || col_we !== e_we || (mode != 0 && wbit !== e_p)) begin
        failures++;
        $display("FAIL sel=%0d mode=%0d p=%0d n=%0d we=%h", sel, mode, datap, datan, col_we);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
