// tb_buffer_memory: test of the Buffer Memory.
// Random PE cycles store random results at random entries and read random
// entries; a model array checks that the read word appears one PE cycle
// later, that a same-entry read and write return the old word, and that
// nothing moves while the PE-cycle enable is low.
//
// The 16-word size follows the reference design; the read-during-write rule
// checked here is this design's own choice. A watchdog ends a hung run with
// a failure.
module tb_buffer_memory;
  logic clk = 0, ce = 0, we = 0;
  logic [3:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  buffer_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_r;
    // fill every entry first
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      ce = 1; we = 1; wr_addr = 4'(i); wdata = $urandom; model[i] = wdata; rd_addr = 0;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      ce = ($urandom_range(4) != 0);
      we = $urandom_range(1);
      wr_addr = 4'($urandom_range(15));
      rd_addr = (t % 7 == 0) ? wr_addr : 4'($urandom_range(15));
      wdata = $urandom;
      if (ce) exp_r = model[rd_addr];
      if (ce && we) model[wr_addr] = wdata;
      @(posedge clk);
      #1;
      if (t > 0) begin
        checks++;
        if (rdata !== exp_r) begin
          failures++;
          if (failures < 10) $display("t %0d: got %h expected %h", t, rdata, exp_r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
