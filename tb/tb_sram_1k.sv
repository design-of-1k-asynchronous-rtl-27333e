// End-to-end testbench for sram_1k at its default size (32 x 32 = 1024 bits).
//
// Three passes over the memory, driven one clk cycle at a time:
//   1. write a random bit to every address, operations back to back (CSNB
//      held low);
//   2. read every address back, back to back;
//   3. 3000 random reads and writes with random idle gaps.
// A reference memory and a reference output register predict dout after
// every edge: a read must show its bit on dout at the second edge after the
// request was presented (accept edge plus one access cycle) and dout must
// hold the last read bit through writes, idle cycles and deselect. During
// each access cycle the inputs are scrambled, which the memory must ignore
// because it captured them at the accept edge.
//
// Counted mechanisms, each of which must occur: accepted reads, accepted
// writes, back-to-back operations, idle (precharge) cycles, output held
// across a write, output held across an idle cycle, inputs changed during
// an access.
module tb_sram_1k;
  localparam int unsigned N = 1024;

  logic       clk = 1'b0, rst_n;
  logic       csnb, wenb, din, dout;
  logic [9:0] addr;

  logic       mem   [N];
  logic       m_dout;
  int checks = 0, failures = 0;
  int n_read = 0, n_write = 0, n_b2b = 0, n_idle = 0;
  int n_hold_write = 0, n_hold_idle = 0, n_scrambled = 0;

  sram_1k dut (.clk, .rst_n, .csnb, .wenb, .addr, .din, .dout);

  always #5 clk = ~clk;   // 10 ns period

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycle after an accept: scramble all inputs, then check dout after the edge.
  task automatic access_cycle(logic is_write, logic [9:0] a, logic d, logic next_low);
    @(negedge clk);
    csnb = ~next_low;        // the device ignores CSNB while accessing
    wenb = 1'($urandom);
    addr = 10'($urandom);
    din  = 1'($urandom);
    if (addr != a || din != d) n_scrambled++;
    @(posedge clk);
    if (is_write) begin
      mem[a] = d;
      n_write++;
      if (m_dout != d) n_hold_write++;
    end else begin
      m_dout = mem[a];
      n_read++;
    end
    #1;
    checks++;
    if (dout !== m_dout) begin
      failures++;
      $display("FAIL %s addr=%0d dout=%0d exp=%0d at %0t", is_write ? "write" : "read",
               a, dout, m_dout, $time);
    end
  endtask

  // Present one request on the accept edge, then run its access cycle.
  task automatic op(logic is_write, logic [9:0] a, logic d, logic keep_low);
    @(negedge clk);
    csnb = 1'b0; wenb = ~is_write; addr = a; din = d;
    @(posedge clk);
    #1;
    checks++;
    if (dout !== m_dout) begin
      failures++;
      $display("FAIL dout changed on accept edge at %0t", $time);
    end
    access_cycle(is_write, a, d, keep_low);
    if (keep_low) n_b2b++;
  endtask

  task automatic idle_cycle();
    @(negedge clk);
    csnb = 1'b1; wenb = 1'($urandom); addr = 10'($urandom); din = 1'($urandom);
    @(posedge clk);
    #1;
    n_idle++;
    if (m_dout != mem[addr]) n_hold_idle++;
    checks++;
    if (dout !== m_dout) begin
      failures++;
      $display("FAIL dout not held in idle cycle at %0t", $time);
    end
  endtask

  initial begin
    rst_n = 1'b0; csnb = 1'b1; wenb = 1'b1; addr = '0; din = 1'b0;
    m_dout = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (dout !== 1'b0) begin failures++; $display("FAIL reset output"); end

    for (int i = 0; i < N; i++) op(1'b1, 10'(i), 1'($urandom), i != N - 1);
    idle_cycle();
    for (int i = 0; i < N; i++) op(1'b0, 10'(i), 1'b0, i != N - 1);
    idle_cycle();
    for (int i = 0; i < 3000; i++) begin
      logic w;
      int gap;
      w   = 1'($urandom);
      gap = $urandom_range(3) == 0 ? $urandom_range(1, 3) : 0;
      op(w, 10'($urandom), 1'($urandom), gap == 0);
      repeat (gap) idle_cycle();
    end

    $display("reads %0d writes %0d back-to-back %0d idle %0d held-over-write %0d held-over-idle %0d scrambled %0d",
             n_read, n_write, n_b2b, n_idle, n_hold_write, n_hold_idle, n_scrambled);
    checks++;
    if (n_read == 0 || n_write == 0 || n_b2b == 0 || n_idle == 0 ||
        n_hold_write == 0 || n_hold_idle == 0 || n_scrambled == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
