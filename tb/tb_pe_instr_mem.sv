// tb_pe_instr_mem: test of pe_instr_mem.
// Writes random words through the host port, then fetches random addresses
// and checks that the registered output shows the fetched word on the next
// clock and keeps it while fetch_en is low.
//
// The 52-bit word and 1024-word depth are the defaults of the design; the
// test pattern and the watchdog are this testbench's own. A watchdog ends a
// hung run with a failure.
module tb_pe_instr_mem;
  import vec_pkg::*;
  localparam int DEPTH = PROG_DEPTH;
  localparam int W = INSTR_W;

  logic clk = 0, host_we = 0, fetch_en = 0;
  logic [9:0] host_addr = 0, fetch_addr = 0;
  logic [W-1:0] host_wdata = 0;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;
  pe_instr_t instr;
  pe_instr_mem dut (.*);
  function automatic logic [W-1:0] out_word(); return W'(instr); endfunction

  always #5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] last;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = 10'(i);
      host_wdata = W'({$urandom, $urandom, $urandom});
      model[i] = host_wdata;
    end
    @(negedge clk);
    host_we = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      fetch_en = ($urandom_range(3) != 0);
      fetch_addr = 10'($urandom_range(DEPTH - 1));
      if (fetch_en) last = model[fetch_addr];
      @(negedge clk);
      fetch_en = 0;
      if (t > 0 || fetch_en) begin
        checks++;
        if (out_word() !== last) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %h expected %h", t, out_word(), last);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
