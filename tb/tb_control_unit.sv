// Testbench for control_unit: random chip-select, write-enable, address and
// completion inputs, drawn fresh every cycle. A reference model of the
// two-phase sequence (precharge/accept, access until completion) predicts
// every internal control signal before each clock edge and the captured
// address after it. Counts accepted reads and writes, completed reads and
// writes, and access cycles spent waiting for a completion; each must occur.
module tb_control_unit;
  import sram_pkg::*;

  logic        clk = 1'b0, rst_n;
  logic        csnb, wenb, sense_valid, write_ack;
  logic [4:0]  row_addr_in, col_addr_in, row_addr, col_addr;
  ctrl_t       ctrl;

  // reference model
  logic        m_access, m_write;
  logic [4:0]  m_row, m_col;
  int checks = 0, failures = 0;
  int n_read_acc = 0, n_write_acc = 0, n_read_done = 0, n_write_done = 0, n_wait = 0;

  control_unit dut (.clk, .rst_n, .csnb, .wenb, .row_addr_in, .col_addr_in,
                    .sense_valid, .write_ack, .row_addr, .col_addr, .ctrl);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string name, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d at %0t", name, got, exp, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0; csnb = 1'b1; wenb = 1'b1; sense_valid = 1'b0; write_ack = 1'b0;
    row_addr_in = '0; col_addr_in = '0;
    m_access = 1'b0; m_write = 1'b0; m_row = '0; m_col = '0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      logic acc, done;
      @(negedge clk);
      csnb        = ($urandom_range(2) == 0);
      wenb        = 1'($urandom);
      row_addr_in = 5'($urandom);
      col_addr_in = 5'($urandom);
      sense_valid = ($urandom_range(3) != 0);
      write_ack   = ($urandom_range(3) != 0);
      #1;
      acc  = !m_access && !csnb;
      done = m_access && (m_write ? write_ack : sense_valid);
      expect_bit("precharge", ctrl.precharge, !m_access);
      expect_bit("wl_en",     ctrl.wl_en,     m_access);
      expect_bit("col_en",    ctrl.col_en,    m_access);
      expect_bit("sense_en",  ctrl.sense_en,  m_access && !m_write);
      expect_bit("write_en",  ctrl.write_en,  m_access && m_write);
      expect_bit("din_load",  ctrl.din_load,  acc && !wenb);
      expect_bit("dout_load", ctrl.dout_load, done && !m_write);
      if (m_access && !done) n_wait++;
      if (done && m_write) n_write_done++;
      if (done && !m_write) n_read_done++;
      @(posedge clk);
      if (acc) begin
        m_access = 1'b1; m_write = !wenb; m_row = row_addr_in; m_col = col_addr_in;
        if (!wenb) n_write_acc++; else n_read_acc++;
      end else if (done) begin
        m_access = 1'b0;
      end
      #1;
      checks++;
      if (m_access && (row_addr !== m_row || col_addr !== m_col)) begin
        failures++;
        $display("FAIL captured address %0d/%0d exp %0d/%0d", row_addr, col_addr, m_row, m_col);
      end
    end
    $display("reads accepted %0d, writes accepted %0d, reads done %0d, writes done %0d, wait cycles %0d",
             n_read_acc, n_write_acc, n_read_done, n_write_done, n_wait);
    checks++;
    if (n_read_acc == 0 || n_write_acc == 0 || n_read_done == 0 || n_write_done == 0 || n_wait == 0) begin
      failures++;
      $display("FAIL a control path was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
