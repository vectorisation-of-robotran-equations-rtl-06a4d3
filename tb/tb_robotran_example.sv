// tb_robotran_example: runs small multibody equations on the engine.
//
// Four programs, each scheduled by sched_pkg, loaded, run and checked:
//   1. the atomised block of kinematic equations AF24 .. OM26 (negations
//      written as 0 - x, sums split into products and one addition);
//   2. the binary expression tree of the force term CF323, a left-to-right
//      cascade: ((((0 + FA123*L2) - FA223*L1) - OM223*(I1*OM323))
//               + OM223*(I5*OM123)) + I9*OA323;
//   3. the same with the leading zero removed (FA123*L2 - FA223*L1 ...);
//   4. the same as a balanced tree, ((FA123*L2 - FA223*L1) + I9*OA323)
//              + (OM223*(I5*OM123) - OM223*(I1*OM323)).
// With a multiply costing 5 + 2 and an add 10 + 2 PE cycles, the critical
// paths are 38, 67, 55 and 43 PE cycles; with 8 PEs nothing else limits
// these tiny graphs, so each run must take exactly its critical path
// (2 + 2 x cycles clocks) and every result must match the single-precision
// reference. Removing the zero must save one addition (12 cycles).
//
// The equations, the inserted zeros and the 7/12 cycle weights are those of
// the reference work. The random inputs (either sign, 2^-3 <= |x| < 2^4), the
// balanced form and the read-back through the host port are this
// testbench's own. A watchdog ends the run with a failure after 10 ms.
module tb_robotran_example;
  import vec_pkg::*;
  import fp_ref_pkg::*;
  import sched_pkg::*;

  localparam int N_PE = N_ADD_DEF + N_MUL_DEF;

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
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // schedule, load, run and check one program
  task automatic execute(Sched s, string name, int exp_len, int results[$]);
    int clocks;
    s.run();
    checks++;
    if (s.failed) begin failures++; $display("%s: schedule failed", name); return; end
    chk({name, " program length"}, s.length, exp_len);
    chk({name, " critical path"}, s.crit, exp_len);
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
    @(negedge clk);
    start = 1; num_cycles = 11'(s.length);
    @(negedge clk);
    start = 0;
    clocks = 1;
    while (!done) begin clocks++; @(negedge clk); end
    chk({name, " clocks"}, clocks, 2 + 2 * s.length);
    foreach (results[i]) begin
      logic [31:0] got;
      int v, pe;
      v = results[i];
      pe = s.pe_of[v];
      for (int p = N_PE - 1; p >= 0; p--) if (s.avail[p][v] != -1) pe = p;
      hr(pe, v, got);
      checks++;
      if (canon(got) !== canon(s.value[v])) begin
        failures++;
        $display("%s: value %0d got %h expected %h", name, v, got, s.value[v]);
      end
    end
    $display("%s: %0d operations in %0d PE cycles", name, s.n_val - s.n_init, s.length);
  endtask

  function automatic logic [31:0] r();
    return rand_fp(124, 130) ;
  endfunction

  initial begin
    Sched s;
    int res[$];
    repeat (4) @(posedge clk);
    rst_n = 1;

    // ---- 1. kinematic block
    begin
      int zero, g3, s4, c4, qp4, c5, s5, qp5, s6, c6;
      int af24d, af24, af34d, af34, om15, om35, af15d, af15, af35;
      int om16d, om16g, om16, om26d, om26g, om26;
      s = new(N_ADD_DEF, N_MUL_DEF, ADD_STAGES_DEF, MUL_STAGES_DEF, PROG_DEPTH);
      zero = s.add_init(32'h0); g3 = s.add_init(r()); s4 = s.add_init(r());
      c4 = s.add_init(r()); qp4 = s.add_init(r()); c5 = s.add_init(r());
      s5 = s.add_init(r()); qp5 = s.add_init(r()); s6 = s.add_init(r());
      c6 = s.add_init(r());
      af24d = s.add_op(OP_MUL, g3, s4);     af24 = s.add_op(OP_SUB, zero, af24d);
      af34d = s.add_op(OP_MUL, g3, c4);     af34 = s.add_op(OP_SUB, zero, af34d);
      om15  = s.add_op(OP_MUL, qp4, c5);    om35 = s.add_op(OP_MUL, qp4, s5);
      af15d = s.add_op(OP_MUL, af34, s5);   af15 = s.add_op(OP_SUB, zero, af15d);
      af35  = s.add_op(OP_MUL, af34, c5);
      om16d = s.add_op(OP_MUL, om15, c6);   om16g = s.add_op(OP_MUL, qp5, s6);
      om16  = s.add_op(OP_ADD, om16g, om16d);
      om26d = s.add_op(OP_MUL, om15, s6);   om26g = s.add_op(OP_MUL, qp5, c6);
      om26  = s.add_op(OP_SUB, om26g, om26d);
      res = '{af24, af34, om15, om35, af15, af35, om16, om26};
      execute(s, "kinematic block", 38, res);
    end

    // ---- 2..4. CF323 in three forms
    for (int form = 0; form < 3; form++) begin
      int zero, fa1, fa2, l1, l2, i1, i5, i9, om1, om2, om3, oa3;
      int m1, m2, m3, m4, m5, m6, m7, a1, a2, a3, a4, a5;
      s = new(N_ADD_DEF, N_MUL_DEF, ADD_STAGES_DEF, MUL_STAGES_DEF, PROG_DEPTH);
      zero = s.add_init(32'h0);
      fa1 = s.add_init(r()); fa2 = s.add_init(r()); l1 = s.add_init(r()); l2 = s.add_init(r());
      i1 = s.add_init(r()); i5 = s.add_init(r()); i9 = s.add_init(r());
      om1 = s.add_init(r()); om2 = s.add_init(r()); om3 = s.add_init(r());
      oa3 = s.add_init(r());
      m1 = s.add_op(OP_MUL, fa1, l2);
      m2 = s.add_op(OP_MUL, fa2, l1);
      m3 = s.add_op(OP_MUL, i1, om3);  m4 = s.add_op(OP_MUL, om2, m3);
      m5 = s.add_op(OP_MUL, i5, om1);  m6 = s.add_op(OP_MUL, om2, m5);
      m7 = s.add_op(OP_MUL, i9, oa3);
      case (form)
        0: begin
          a1 = s.add_op(OP_ADD, zero, m1); a2 = s.add_op(OP_SUB, a1, m2);
          a3 = s.add_op(OP_SUB, a2, m4);   a4 = s.add_op(OP_ADD, a3, m6);
          a5 = s.add_op(OP_ADD, a4, m7);
          res = '{a5};
          execute(s, "CF323 cascade", 67, res);
        end
        1: begin
          a2 = s.add_op(OP_SUB, m1, m2);   a3 = s.add_op(OP_SUB, a2, m4);
          a4 = s.add_op(OP_ADD, a3, m6);   a5 = s.add_op(OP_ADD, a4, m7);
          res = '{a5};
          execute(s, "CF323 zero removed", 55, res);
        end
        default: begin
          a1 = s.add_op(OP_SUB, m1, m2);   a2 = s.add_op(OP_ADD, a1, m7);
          a3 = s.add_op(OP_SUB, m6, m4);   a4 = s.add_op(OP_ADD, a2, a3);
          res = '{a4};
          execute(s, "CF323 balanced", 43, res);
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
