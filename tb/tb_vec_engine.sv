// tb_vec_engine: end-to-end test of the engine at its default size
// (4 ADD + 4 MULTI PEs, 2048-word PE Memories, 1024-cycle programs).
//
// A random graph of additions, subtractions and multiplications over random
// initial values is scheduled by sched_pkg, loaded through the host port and
// run. The test then checks
//   * the run length: the run takes 2 + 2 x num_cycles clocks (one edge samples start,
//     one prefetches the first program words, two per PE cycle);
//   * every value written into any PE Memory, read back through the host
//     port, against the reference result computed in single precision;
//   * that the initial data is still in place;
// and counts, from the engine's own signals while it runs, how often each
// mechanism happened: direct and indirect (buffered) transfers, buffer
// stores, subtractions, cycles with both PE Memory write ports in use, and
// crossbar broadcasts (one source feeding several write ports). A mechanism
// that never happened counts as a failure. The program is then run a second
// time from the same memories to check that the engine restarts cleanly.
module tb_vec_engine;
  import vec_pkg::*;
  import fp_ref_pkg::*;
  import sched_pkg::*;

  localparam int N_ADD = N_ADD_DEF, N_MUL = N_MUL_DEF, N_PE = N_ADD + N_MUL;
  localparam int N_INIT = 160;
  localparam int N_OPS  = 1800;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [10:0] num_cycles = 0;
  logic busy, done;
  logic [9:0] cur_cycle;
  logic host_we = 0, host_re = 0;
  host_target_e host_target = HT_PE_MEM;
  logic [2:0] host_pe = 0, host_rd_pe = 0;
  logic [11:0] host_addr = 0, host_rd_addr = 0;
  logic [63:0] host_wdata = 0;
  logic [31:0] host_rdata;

  vec_engine dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanism monitor
  int m_direct [N_PE], m_indirect [N_PE], m_bstore [N_PE], m_sub [N_PE], m_dual [N_PE];
  int m_bcast;
  logic [3:0] sel_q [2*N_PE];     // crossbar selects of the previous PE cycle

  for (genvar p = 0; p < N_PE; p++) begin : g_mon
    initial begin m_direct[p] = 0; m_indirect[p] = 0; m_bstore[p] = 0; m_sub[p] = 0; m_dual[p] = 0; end
    always @(posedge clk) if (dut.pe_en) begin
      if (dut.g_blk[p].u_blk.instr.we_a) begin
        if (sel_q[2*p] < N_PE) m_direct[p]++; else m_indirect[p]++;
      end
      if (dut.g_blk[p].u_blk.instr.we_b) begin
        if (sel_q[2*p+1] < N_PE) m_direct[p]++; else m_indirect[p]++;
      end
      if (dut.g_blk[p].u_blk.instr.we_a && dut.g_blk[p].u_blk.instr.we_b) m_dual[p]++;
      if (dut.g_blk[p].u_blk.binstr.we) m_bstore[p]++;
      if (p < N_ADD && dut.g_blk[p].u_blk.instr.op_sub) m_sub[p]++;
    end
  end

  initial m_bcast = 0;
  always @(posedge clk) if (dut.pe_en) begin
    // broadcast: one crossbar input written into two or more PE Memories
    for (int o = 0; o < 2*N_PE; o++)
      for (int q = o + 1; q < 2*N_PE; q++)
        if (wr_en(o) && wr_en(q) && sel_q[o] == sel_q[q]) m_bcast++;
    for (int o = 0; o < 2*N_PE; o++) sel_q[o] <= dut.xb_sel[o];
  end

  function automatic bit wr_en(int o);
    case (o)
      0:  return dut.g_blk[0].u_blk.instr.we_a;  1: return dut.g_blk[0].u_blk.instr.we_b;
      2:  return dut.g_blk[1].u_blk.instr.we_a;  3: return dut.g_blk[1].u_blk.instr.we_b;
      4:  return dut.g_blk[2].u_blk.instr.we_a;  5: return dut.g_blk[2].u_blk.instr.we_b;
      6:  return dut.g_blk[3].u_blk.instr.we_a;  7: return dut.g_blk[3].u_blk.instr.we_b;
      8:  return dut.g_blk[4].u_blk.instr.we_a;  9: return dut.g_blk[4].u_blk.instr.we_b;
      10: return dut.g_blk[5].u_blk.instr.we_a; 11: return dut.g_blk[5].u_blk.instr.we_b;
      12: return dut.g_blk[6].u_blk.instr.we_a; 13: return dut.g_blk[6].u_blk.instr.we_b;
      default: return (o == 14) ? dut.g_blk[7].u_blk.instr.we_a : dut.g_blk[7].u_blk.instr.we_b;
    endcase
  endfunction

  // ------------------------------------------------------------ host tasks
  // Host accesses are driven on the falling edge so that back-to-back
  // accesses never race with the rising edge that samples them.
  task automatic hw(host_target_e tg, int pe, int addr, logic [63:0] data);
    @(negedge clk);
    host_we = 1; host_target = tg; host_pe = 3'(pe); host_addr = 12'(addr);
    host_wdata = data;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic hr(int pe, int addr, output logic [31:0] data);
    @(negedge clk);
    host_re = 1; host_rd_pe = 3'(pe); host_rd_addr = 12'(addr);
    @(negedge clk);
    host_re = 0;
    data = host_rdata;
  endtask

  Sched s;

  task automatic load_program();
    for (int p = 0; p < N_PE; p++) begin
      for (int c = 0; c < s.length; c++) begin
        hw(HT_INSTR, p, c, 64'(s.instr[p][c]));
        hw(HT_BUF_INSTR, p, c, 64'(s.binstr[p][c]));
      end
      for (int v = 0; v < s.n_init; v++) hw(HT_PE_MEM, p, v, 64'(s.value[v]));
    end
    for (int c = 0; c < s.length; c++) begin
      logic [63:0] w;
      for (int o = 0; o < 2*N_PE; o++) w[o*4 +: 4] = 4'(s.xsel[c][o]);
      hw(HT_XBAR, 0, c, w);
    end
  endtask

  task automatic run_and_time(output int clocks);
    @(negedge clk);
    start = 1; num_cycles = 11'(s.length);
    @(negedge clk);
    start = 0;
    clocks = 1;
    while (!done) begin clocks++; @(negedge clk); end
  endtask

  task automatic check_memories(int run);
    for (int p = 0; p < N_PE; p++)
      for (int v = 0; v < s.n_val; v++)
        if (s.avail[p][v] != -1) begin
          logic [31:0] got;
          hr(p, v, got);
          checks++;
          if (canon(got) !== canon(s.value[v])) begin
            failures++;
            if (failures < 12)
              $display("run %0d PE %0d value %0d: got %h expected %h", run, p, v, got, s.value[v]);
          end
        end
  endtask

  initial begin
    int clocks;
    s = new(N_ADD, N_MUL, ADD_STAGES_DEF, MUL_STAGES_DEF, PROG_DEPTH);
    // random initial values in [-4, 4) and a random operation graph; operands
    // come mostly from the 40 newest values, so that chains form
    for (int i = 0; i < N_INIT; i++) void'(s.add_init(rand_fp(126, 129)));
    for (int i = 0; i < N_OPS; i++) begin
      int a, b, n;
      op_e k;
      n = s.n_val;
      a = ($urandom_range(3) != 0 && n > 40) ? n - 1 - int'($urandom_range(39)) : int'($urandom_range(n - 1));
      b = ($urandom_range(3) == 0) ? int'($urandom_range(s.n_init - 1)) : int'($urandom_range(n - 1));
      k = op_e'($urandom_range(2));
      void'(s.add_op(k, a, b));
    end
    s.run();
    checks++;
    if (s.failed || s.length > PROG_DEPTH) begin
      failures++;
      $display("schedule failed (length %0d)", s.length);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    $display("schedule: %0d ops in %0d PE cycles, critical path %0d, direct %0d, indirect %0d",
             N_OPS, s.length, s.crit, s.n_direct, s.n_indirect);

    repeat (4) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    load_program();

    run_and_time(clocks);
    checks++;
    if (clocks != 2 + 2 * s.length) begin
      failures++;
      $display("run took %0d clocks, expected %0d", clocks, 2 + 2 * s.length);
    end
    check_memories(1);

    // mechanisms seen during the run
    begin
      int d = 0, ind = 0, bs = 0, sb = 0, du = 0;
      for (int p = 0; p < N_PE; p++) begin
        d += m_direct[p]; ind += m_indirect[p]; bs += m_bstore[p]; sb += m_sub[p]; du += m_dual[p];
      end
      $display("mechanisms: direct %0d indirect %0d buffer-stores %0d subtractions %0d dual-writes %0d broadcasts %0d",
               d, ind, bs, sb, du, m_bcast);
      checks += 7;
      if (d == 0)       begin failures++; $display("no direct transfer happened"); end
      if (ind == 0)     begin failures++; $display("no indirect transfer happened"); end
      if (bs == 0)      begin failures++; $display("no buffer store happened"); end
      if (sb == 0)      begin failures++; $display("no subtraction happened"); end
      if (du == 0)      begin failures++; $display("no dual write happened"); end
      if (m_bcast == 0) begin failures++; $display("no broadcast happened"); end
      if (d != s.n_direct || ind != s.n_indirect) begin
        failures++; $display("transfer counts differ from the schedule");
      end
    end

    // second run of the same program: results must be identical
    run_and_time(clocks);
    checks++;
    if (clocks != 2 + 2 * s.length) failures++;
    check_memories(2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
