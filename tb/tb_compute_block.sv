// tb_compute_block: test of one ADD block and one MULTI block.
// Both blocks get the same random 300-cycle program through the host port:
// every PE cycle starts an operation on two random PE Memory words, writes
// zero, one or two crossbar values into the PE Memory, and stores / reads
// the Buffer Memory at random. The test sequences the blocks itself (a
// prefetch clock, then read and write halves) and checks, every PE cycle,
// the PE result against a reference computed STAGES cycles earlier (so the
// 10- and 5-cycle latencies are checked), the buffer output one cycle after
// each buffer read, and at the end the whole PE Memory range read back
// through the host port.
//
// The block structure and latencies follow the reference design; the program
// is random and the sequencing in this testbench is its own. A watchdog ends
// a hung run with a failure.
module tb_compute_block;
  import vec_pkg::*;
  import fp_ref_pkg::*;
  localparam int T = 300, RANGE = 64;
  localparam int S [2] = '{ADD_STAGES_DEF, MUL_STAGES_DEF};

  logic clk = 0, rst_n = 0, running = 0, phase = 0, pe_en = 0, fetch_en = 0;
  logic [9:0] fetch_addr = 0;
  logic [31:0] xin_a = 0, xin_b = 0;
  logic host_we_mem = 0, host_we_instr = 0, host_we_binstr = 0, host_re = 0;
  logic [11:0] host_addr = 0;
  logic [63:0] host_wdata = 0;
  logic [31:0] result [2], buf_out [2], host_rdata [2];
  int checks = 0, failures = 0;

  compute_block #(.IS_ADD(1'b1)) u_add (
    .clk, .rst_n, .running, .phase, .pe_en, .fetch_en, .fetch_addr, .xin_a, .xin_b,
    .result(result[0]), .buf_out(buf_out[0]), .host_we_mem, .host_we_instr,
    .host_we_binstr, .host_re, .host_addr, .host_wdata, .host_rdata(host_rdata[0]));
  compute_block #(.IS_ADD(1'b0)) u_mul (
    .clk, .rst_n, .running, .phase, .pe_en, .fetch_en, .fetch_addr, .xin_a, .xin_b,
    .result(result[1]), .buf_out(buf_out[1]), .host_we_mem, .host_we_instr,
    .host_we_binstr, .host_re, .host_addr, .host_wdata, .host_rdata(host_rdata[1]));

  always #5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pe_instr_t   prog  [T];
  buf_instr_t  bprog [T];
  logic [31:0] xa [T], xb [T];
  logic [31:0] mem0 [RANGE];
  logic [31:0] mem [2][RANGE];
  logic [31:0] bufm [2][16];
  logic [31:0] res_exp [2][T + 16];

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp, int t);
    checks++;
    if (canon(got) !== canon(exp)) begin
      failures++;
      if (failures < 12) $display("cycle %0d %s: got %h expected %h", t, what, got, exp);
    end
  endtask

  task automatic host_write(int kind, int addr, logic [63:0] d);
    @(negedge clk);
    host_we_mem = (kind == 0); host_we_instr = (kind == 1); host_we_binstr = (kind == 2);
    host_addr = 12'(addr); host_wdata = d;
    @(negedge clk);
    host_we_mem = 0; host_we_instr = 0; host_we_binstr = 0;
  endtask

  initial begin
    logic [31:0] bexp [2];
    // random program
    for (int t = 0; t < T; t++) begin
      prog[t] = '0;
      prog[t].rd_a = 12'($urandom_range(RANGE - 1));
      prog[t].rd_b = 12'($urandom_range(RANGE - 1));
      prog[t].wr_a = 12'($urandom_range(RANGE - 1));
      prog[t].wr_b = 12'($urandom_range(RANGE - 1));
      prog[t].we_a = $urandom_range(1);
      prog[t].we_b = $urandom_range(1) && (prog[t].wr_b != prog[t].wr_a);
      prog[t].op_sub = $urandom_range(1);
      bprog[t].we = $urandom_range(1);
      bprog[t].wr = 4'($urandom_range(15));
      bprog[t].rd = 4'($urandom_range(15));
      xa[t] = rand_fp(100, 150);
      xb[t] = rand_fp(100, 150);
    end
    for (int i = 0; i < RANGE; i++) mem0[i] = rand_fp(100, 150);

    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < T; t++) begin
      host_write(1, t, 64'(prog[t]));
      host_write(2, t, 64'(bprog[t]));
    end
    for (int i = 0; i < RANGE; i++) host_write(0, i, 64'(mem0[i]));
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < RANGE; i++) mem[k][i] = mem0[i];
      for (int e = 0; e < 16; e++) bufm[k][e] = 0;
      for (int t = 0; t < S[k]; t++) res_exp[k][t] = 0;   // pipeline reset value
    end
    // buffer words are unknown until written once: store every entry first
    // by checking buffer output only after an entry was written
    begin
      bit bvalid [2][16];
      bit bq_valid [2];
      for (int k = 0; k < 2; k++) begin
        for (int e = 0; e < 16; e++) bvalid[k][e] = 0;
        bq_valid[k] = 0;
      end
      // prefetch clock
      @(negedge clk);
      fetch_en = 1; fetch_addr = 0;
      for (int t = 0; t < T; t++) begin
        @(negedge clk);
        running = 1; phase = 0; pe_en = 0; fetch_en = 0;
        xin_a = xa[t]; xin_b = xb[t];
        // buffer output during this cycle (read in the previous one)
        for (int k = 0; k < 2; k++)
          if (bq_valid[k]) chk(k ? "mul buf_out" : "add buf_out", buf_out[k], bexp[k], t);
        // operands are read now, before this cycle's writes
        for (int k = 0; k < 2; k++) begin
          logic [31:0] a, b;
          a = mem[k][prog[t].rd_a];
          b = mem[k][prog[t].rd_b];
          res_exp[k][t + S[k]] = k ? ref_mul(a, b) : ref_add(a, b, prog[t].op_sub);
        end
        @(negedge clk);
        phase = 1; pe_en = 1; fetch_en = 1; fetch_addr = 10'(t + 1);
        for (int k = 0; k < 2; k++) begin
          chk(k ? "mul result" : "add result", result[k], res_exp[k][t], t);
          if (prog[t].we_a) mem[k][prog[t].wr_a] = xa[t];
          if (prog[t].we_b) mem[k][prog[t].wr_b] = xb[t];
          bq_valid[k] = bvalid[k][bprog[t].rd];
          bexp[k] = bufm[k][bprog[t].rd];
          if (bprog[t].we) begin
            bufm[k][bprog[t].wr] = res_exp[k][t];
            bvalid[k][bprog[t].wr] = 1;
          end
        end
      end
    end
    @(negedge clk);
    running = 0; phase = 0; pe_en = 0; fetch_en = 0;
    for (int i = 0; i < RANGE; i++) begin
      @(negedge clk);
      host_re = 1; host_addr = 12'(i);
      @(negedge clk);
      host_re = 0;
      chk("add mem", host_rdata[0], mem[0][i], i);
      chk("mul mem", host_rdata[1], mem[1][i], i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
