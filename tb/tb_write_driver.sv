// Testbench for write_driver: every combination of enable, data bit and
// observed data-line levels. The driver must pull exactly the data line
// that encodes the bit low, and acknowledge only once the lines show the
// bit as a complementary pair.
module tb_write_driver;
  logic we, din, datap, datan, pd_p, pd_n, write_ack;
  int checks = 0, failures = 0;

  write_driver dut (.we, .din, .datap, .datan, .pd_p, .pd_n, .write_ack);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic e_pdp, e_pdn, e_ack;
      {we, din, datap, datan} = 4'(v);
      #1;
      e_pdp = we && din == 1'b0;
      e_pdn = we && din == 1'b1;
      e_ack = we && ((din && datap && !datan) || (!din && !datap && datan));
      checks++;
      if (pd_p !== e_pdp || pd_n !== e_pdn || write_ack !== e_ack) begin
        failures++;
        $display("FAIL we=%0d din=%0d p=%0d n=%0d -> pd_p=%0d pd_n=%0d ack=%0d",
                 we, din, datap, datan, pd_p, pd_n, write_ack);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
