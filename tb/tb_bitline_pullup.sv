// Testbench for bitline_pullup: random cell pull-down patterns with the
// precharge on and off; with precharge on every line must read high, with
// it off a line must read low exactly where a cell pulls it.
module tb_bitline_pullup;
  localparam int unsigned COLS = 32;

  logic            pre_en;
  logic [COLS-1:0] bl_pd, blb_pd, bl, blb;
  int checks = 0, failures = 0;

  bitline_pullup #(.COLS(COLS)) dut (.pre_en, .bl_pd, .blb_pd, .bl, .blb);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      pre_en = i[0];
      bl_pd  = $urandom;
      blb_pd = $urandom;
      #1;
      for (int c = 0; c < COLS; c++) begin
        logic exp_bl, exp_blb;
        exp_bl  = pre_en ? 1'b1 : !bl_pd[c];
        exp_blb = pre_en ? 1'b1 : !blb_pd[c];
        checks++;
        if (bl[c] !== exp_bl || blb[c] !== exp_blb) begin
          failures++;
          $display("FAIL pre=%0d col=%0d bl=%0d blb=%0d", pre_en, c, bl[c], blb[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
