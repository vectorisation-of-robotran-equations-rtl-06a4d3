// tb_pipeline_couples: the engine at every ADD/MULTI pipeline couple.
//
// The reference work picks its PE latencies from a list of fifteen
// (ADD stages, MULTI stages) couples, each the pair of vendor cores that
// reach a common clock frequency:
//   ADD   1 2 3 3 4 5 6 6 7 9 9 10 14 14 14
//   MULTI 2 2 2 3 3 3 3 4 4 4 5  5  5  8  9
// and compares how many cycles an equation set takes with each. This
// testbench builds one full-size engine per couple (only ADD_STAGES and
// MUL_STAGES differ from the defaults). Every engine runs the same random
// graph of 48 inputs and 400 operations, scheduled for its own latencies
// by sched_pkg. All fifteen run side by side in simulation time. For each
// couple the test checks:
//   * that the run takes 2 + 2 x length clocks;
//   * that the length is at least the critical path, whose weights are
//     S + 2 for a PE of S stages;
//   * every value written into a PE Memory, against the single-precision
//     reference.
// It prints the program length of each couple, which grows with the
// latencies as in the reference study, and the run time at the PE clock
// that the couple allows (37 .. 230 MHz). The couples come from the reference
// work. The graph, its size and the random inputs are this testbench's own.
// A watchdog ends the run with a failure after 50 ms of simulated time.
module tb_pipeline_couples;
  import vec_pkg::*;
  import fp_ref_pkg::*;
  import sched_pkg::*;

  localparam int N_CFG = 15;
  localparam int ADD_S [N_CFG] = '{1, 2, 3, 3, 4, 5, 6, 6, 7, 9, 9, 10, 14, 14, 14};
  localparam int MUL_S [N_CFG] = '{2, 2, 2, 3, 3, 3, 3, 4, 4, 4, 5,  5,  5,  8,  9};
  // PE clock (MHz) that each couple reaches, used only to print a run time
  localparam int F_MHZ [N_CFG] = '{37, 55, 63, 72, 89, 103, 109, 120, 144, 153, 159, 178, 199, 218, 230};
  localparam int N_PE   = N_ADD_DEF + N_MUL_DEF;
  localparam int N_INIT = 48;
  localparam int N_OPS  = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_finished = 0;

  // the common operation graph: kind, operand a, operand b of each operation
  int g_kind [N_OPS], g_a [N_OPS], g_b [N_OPS];
  logic [31:0] g_init [N_INIT];
  bit graph_ready = 0;

  initial begin
    for (int i = 0; i < N_INIT; i++) g_init[i] = rand_fp(126, 129);
    for (int i = 0; i < N_OPS; i++) begin
      int n;
      n = N_INIT + i;
      g_a[i] = ($urandom_range(3) != 0 && n > 24) ? n - 1 - int'($urandom_range(23))
                                                  : int'($urandom_range(n - 1));
      g_b[i] = int'($urandom_range(n - 1));
      g_kind[i] = int'($urandom_range(2));
    end
    graph_ready = 1;
  end

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < N_CFG; k++) begin : g_cfg
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

    vec_engine #(.ADD_STAGES(ADD_S[k]), .MUL_STAGES(MUL_S[k])) u_dut (
      .clk, .rst_n, .start, .num_cycles, .busy, .done, .cur_cycle,
      .host_we, .host_target, .host_pe, .host_addr, .host_wdata,
      .host_re, .host_rd_pe, .host_rd_addr, .host_rdata
    );

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

    initial begin
      Sched s;
      int clocks;
      wait (graph_ready && rst_n);
      s = new(N_ADD_DEF, N_MUL_DEF, ADD_S[k], MUL_S[k], PROG_DEPTH);
      for (int i = 0; i < N_INIT; i++) void'(s.add_init(g_init[i]));
      for (int i = 0; i < N_OPS; i++) void'(s.add_op(op_e'(g_kind[i]), g_a[i], g_b[i]));
      s.run();
      checks += 2;
      if (s.failed || s.length > PROG_DEPTH) begin
        failures++;
        $display("ADD %0d / MULTI %0d: schedule failed", ADD_S[k], MUL_S[k]);
      end else begin
        if (s.length < s.crit) begin
          failures++;
          $display("ADD %0d / MULTI %0d: length %0d below critical path %0d",
                   ADD_S[k], MUL_S[k], s.length, s.crit);
        end
        // load
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
        // run
        @(negedge clk);
        start = 1; num_cycles = 11'(s.length);
        @(negedge clk);
        start = 0;
        clocks = 1;
        while (!done) begin clocks++; @(negedge clk); end
        checks++;
        if (clocks != 2 + 2 * s.length) begin
          failures++;
          $display("ADD %0d / MULTI %0d: %0d clocks, expected %0d",
                   ADD_S[k], MUL_S[k], clocks, 2 + 2 * s.length);
        end
        // results
        for (int p = 0; p < N_PE; p++)
          for (int v = 0; v < s.n_val; v++)
            if (s.avail[p][v] != -1) begin
              logic [31:0] got;
              hr(p, v, got);
              checks++;
              if (canon(got) !== canon(s.value[v])) begin
                failures++;
                if (failures < 12)
                  $display("ADD %0d / MULTI %0d: PE %0d value %0d got %h expected %h",
                           ADD_S[k], MUL_S[k], p, v, got, s.value[v]);
              end
            end
        $display("ADD %2d / MULTI %0d: %0d PE cycles, critical path %0d, direct %0d, indirect %0d, %0.2f us at %0d MHz",
                 ADD_S[k], MUL_S[k], s.length, s.crit, s.n_direct, s.n_indirect,
                 real'(s.length) / real'(F_MHZ[k]), F_MHZ[k]);
      end
      n_finished++;
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (n_finished == N_CFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
