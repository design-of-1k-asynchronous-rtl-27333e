// Testbench for sense_amp: every combination of sense enable and data-line
// levels. The sensed bit follows DATAP while enabled and is 0 otherwise; valid is raised only when enabled
// and the two lines differ.
module tb_sense_amp;
  logic se, datap, datan, q, valid;
  int checks = 0, failures = 0;

  sense_amp dut (.se, .datap, .datan, .q, .valid);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic e_valid;
      {se, datap, datan} = 3'(v);
      #1;
      e_valid = se && ((datap && !datan) || (!datap && datan));
      checks++;
      if (valid !== e_valid || q !== (se && datap)) begin
        failures++;
        $display("FAIL se=%0d p=%0d n=%0d -> q=%0d valid=%0d", se, datap, datan, q, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
