// tb_pe_add: self-checking test of the ADD processing element.
// Streams one operation per PE cycle (random normal operands, both operation
// selects, and zero / infinity / NaN / cancellation corner cases) and checks
// every result against fp_ref_pkg exactly STAGES PE cycles after issue. It also
// stalls the clock enable for a while to check that the pipeline holds.
//
// The 10-stage latency follows the reference design; the rounding and
// flush-to-zero rules checked are this design's own choice of IEEE-754 subset. A
// watchdog ends a hung run with a failure.
module tb_pe_add;
  import fp_ref_pkg::*;
  localparam int STAGES = 10;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [31:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0;

  pe_add #(.STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_q[$];
  int issued;
  localparam int N = 3000;

  function automatic void pick(input int i, output logic [31:0] x, output logic [31:0] z,
                               output logic s);
    s = $urandom_range(1);
    case (i)
      0: begin x = 32'h3F80_0000; z = 32'h3F80_0000; end      // 1 - 1 or 1 + 1
      1: begin x = 32'h7F80_0000; z = 32'h7F80_0000; end      // inf +/- inf
      2: begin x = 32'h7FC0_0001; z = 32'h3F80_0000; end      // NaN
      3: begin x = 32'h0000_0000; z = 32'h8000_0000; end      // +0 +/- -0
      4: begin x = 32'h4000_0000; z = 32'h0000_0000; end      // 2 +/- 0
      5: begin x = 32'h7F7F_FFFF; z = 32'h7F7F_FFFF; s = 0; end // overflow
      6: begin x = 32'h3F80_0001; z = 32'h3F80_0000; s = 1; end // 1 ulp cancel
      default: begin
        x = rand_fp(100, 150);
        z = (i % 3 == 0) ? {~x[31] ^ s, x[30:23] - 8'($urandom_range(2)), 23'($urandom)}
                         : rand_fp(int'(x[30:23]) - 28 < 1 ? 1 : int'(x[30:23]) - 28,
                                   int'(x[30:23]) + 28 > 254 ? 254 : int'(x[30:23]) + 28);
      end
    endcase
  endfunction

  initial begin
    a = 0; b = 0; sub = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    issued = 0;
    for (int cyc = 0; cyc < N + STAGES - 1; cyc++) begin
      logic [31:0] x, z;
      logic s;
      if (cyc == 1000) begin
        // hold the pipeline for 7 clocks: nothing may move
        ce = 0;
        repeat (7) @(posedge clk);
      end
      if (cyc < N) begin
        pick(cyc, x, z, s);
        a <= x; b <= z; sub <= s;
        exp_q.push_back(ref_add(x, z, s));
      end
      ce <= 1;
      @(posedge clk);
      #1;
      if (cyc >= STAGES - 1) begin
        logic [31:0] e;
        e = exp_q.pop_front();
        checks++;
        if (canon(y) !== e) begin
          failures++;
          if (failures < 10) $display("mismatch op %0d: got %h expected %h", cyc - STAGES + 1, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
