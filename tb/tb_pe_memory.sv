// tb_pe_memory: test of the time-multiplexed PE Memory.
// First replays the read/write sequence of the reference timing diagram
// (read addresses 31, 59, 45, 21, 74; write addresses 45, 70, 13, 56, 25;
// write enable 0, 1, 1, 0, 1) and checks the port address of every half
// cycle: 31 | 59 70 | 45 13 | 21 | 74 25. Then runs 3000 random PE cycles
// (two reads, up to two writes each) against a model array, checks the
// operands, and finally reads the whole model range back through the host
// port.
//
// The diagram values come from the reference design; the random phase and
// the model are this testbench's own. A watchdog ends a hung run with a
// failure.
module tb_pe_memory;
  localparam int DEPTH = 2048;
  localparam int RANGE = 256;   // addresses used by the random part

  logic clk = 0, rst_n = 0, running = 0, phase = 0;
  logic [11:0] rd_addr_a = 0, rd_addr_b = 0, wr_addr_a = 0, wr_addr_b = 0, host_addr = 0;
  logic we_a = 0, we_b = 0, host_we = 0, host_re = 0;
  logic [31:0] wdata_a = 0, wdata_b = 0, host_wdata = 0, host_rdata, opa, opb;
  int checks = 0, failures = 0;
  logic [31:0] model [RANGE];

  pe_memory #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // one PE cycle: read half then write half; checks the port A address of
  // both halves when expected values are given
  task automatic pe_cycle(int ra, int rb, int wa, int wb, bit ea, bit eb,
                          logic [31:0] da, logic [31:0] db, int exp0, int exp1);
    @(negedge clk);
    phase = 0; rd_addr_a = 12'(ra); rd_addr_b = 12'(rb); wr_addr_a = 12'(wa);
    wr_addr_b = 12'(wb); we_a = ea; we_b = eb; wdata_a = da; wdata_b = db;
    #1 if (exp0 >= 0) chk("addr read half", 32'(dut.addr_pa), 32'(exp0));
    @(negedge clk);
    phase = 1;
    #1 if (exp1 >= 0) chk("addr write half", 32'(dut.addr_pa), 32'(exp1));
  endtask

  initial begin
    int ra[5] = '{31, 59, 45, 21, 74};
    int wa[5] = '{45, 70, 13, 56, 25};
    bit en[5] = '{0, 1, 1, 0, 1};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // host fill of the model range
    for (int i = 0; i < RANGE; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = 12'(i); host_wdata = $urandom; model[i] = host_wdata;
    end
    @(negedge clk);
    host_we = 0;
    running = 1;
    // the timing-diagram sequence (port B writes elsewhere)
    for (int t = 0; t < 5; t++) begin
      logic [31:0] d;
      d = $urandom;
      pe_cycle(ra[t], 200 + t, wa[t], 210 + t, en[t], 1'b0, d, 0, ra[t], en[t] ? wa[t] : ra[t]);
      if (en[t]) model[wa[t]] = d;
    end
    // random cycles
    for (int t = 0; t < 3000; t++) begin
      int a, b, x, y;
      bit ea, eb;
      logic [31:0] da, db;
      a = $urandom_range(RANGE - 1); b = $urandom_range(RANGE - 1);
      x = $urandom_range(RANGE - 1); y = $urandom_range(RANGE - 1);
      ea = $urandom_range(1); eb = $urandom_range(1) && (y != x);
      da = $urandom; db = $urandom;
      pe_cycle(a, b, x, y, ea, eb, da, db, -1, -1);
      // operands were read in the read half, before this cycle's writes
      chk("opa", opa, model[a]);
      chk("opb", opb, model[b]);
      if (ea) model[x] = da;
      if (eb) model[y] = db;
    end
    @(negedge clk);
    running = 0; we_a = 0; we_b = 0;
    for (int i = 0; i < RANGE; i++) begin
      @(negedge clk);
      host_re = 1; host_addr = 12'(i);
      @(negedge clk);
      host_re = 0;
      chk("host read", host_rdata, model[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
