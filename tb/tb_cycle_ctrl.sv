// tb_cycle_ctrl: test of the program sequencer.
// Runs programs of several lengths (including 0 and the full 1024 cycles)
// and compares every clock with the expected sequence: one prefetch clock
// fetching word 0, then per PE cycle a read half and a write half, pe_en and
// the fetch of word cycle+1 in the write half, and done after exactly
// num_cycles PE cycles. Also checks that a start while busy is ignored.
//
// The two memory clocks per PE cycle follow the reference design; the
// prefetch clock and the start/done handshake are this design's own choices.
// A watchdog ends a hung run with a failure.
module tb_cycle_ctrl;
  logic clk = 0, rst_n = 0, start = 0;
  logic [10:0] num_cycles = 0;
  logic busy, done, running, phase, pe_en, fetch_en;
  logic [9:0] cycle, fetch_addr;
  int checks = 0, failures = 0;

  cycle_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp, int k);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("clock %0d %s: got %0d expected %0d", k, what, got, exp);
    end
  endtask

  task automatic run(int n);
    @(negedge clk);
    start = 1; num_cycles = 11'(n);
    @(negedge clk);
    start = 0;
    if (n == 0) begin
      chk("done (empty)", int'(done), 1, 0);
      chk("busy (empty)", int'(busy), 0, 0);
      return;
    end
    // prefetch clock
    chk("busy", int'(busy), 1, 0);
    chk("running", int'(running), 0, 0);
    chk("fetch_en", int'(fetch_en), 1, 0);
    chk("fetch_addr", int'(fetch_addr), 0, 0);
    for (int k = 0; k < 2 * n; k++) begin
      @(negedge clk);
      if (k == 3) start = 1;   // must be ignored
      chk("running", int'(running), 1, k);
      chk("phase", int'(phase), k % 2, k);
      chk("cycle", int'(cycle), k / 2, k);
      chk("pe_en", int'(pe_en), k % 2, k);
      chk("fetch_en", int'(fetch_en), k % 2, k);
      if (k % 2) chk("fetch_addr", int'(fetch_addr), (k / 2 + 1) % 1024, k);
      chk("done", int'(done), 0, k);
      if (k == 3) start = 0;
    end
    @(negedge clk);
    chk("done", int'(done), 1, -1);
    chk("busy", int'(busy), 0, -1);
    chk("pe_en", int'(pe_en), 0, -1);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5);
    run(0);
    run(1);
    run(37);
    run(1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
