// tb_pe_mul: self-checking test of the MULTI processing element.
// Streams one product per PE cycle (random normal operands plus zero,
// infinity, NaN, overflow and underflow corner cases) and checks each result
// against fp_ref_pkg exactly STAGES PE cycles after issue, with a stretch of
// disabled clock enable in the middle to check that the pipeline holds.
//
// The 5-stage latency follows the reference design; the rounding and
// flush-to-zero rules checked are this design's own choice of IEEE-754 subset. A
// watchdog ends a hung run with a failure.
module tb_pe_mul;
  import fp_ref_pkg::*;
  localparam int STAGES = 5;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  pe_mul #(.STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_q[$];
  localparam int N = 3000;

  function automatic void pick(input int i, output logic [31:0] x, output logic [31:0] z);
    case (i)
      0: begin x = 32'h3FC0_0000; z = 32'h4000_0000; end      // 1.5 * 2
      1: begin x = 32'h7F80_0000; z = 32'h0000_0000; end      // inf * 0
      2: begin x = 32'hFF80_0000; z = 32'h4000_0000; end      // -inf * 2
      3: begin x = 32'h7FC0_0001; z = 32'h3F80_0000; end      // NaN
      4: begin x = 32'h8000_0000; z = 32'h4000_0000; end      // -0 * 2
      5: begin x = 32'h7F00_0000; z = 32'h7F00_0000; end      // overflow
      6: begin x = 32'h0100_0000; z = 32'h0100_0000; end      // underflow
      7: begin x = 32'h3FFF_FFFF; z = 32'h3FFF_FFFF; end      // rounds up to carry
      default: begin
        x = rand_fp(64, 190);
        z = rand_fp(64, 190);
      end
    endcase
  endfunction

  initial begin
    a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < N + STAGES - 1; cyc++) begin
      logic [31:0] x, z;
      if (cyc == 777) begin
        ce = 0;
        repeat (5) @(posedge clk);
      end
      if (cyc < N) begin
        pick(cyc, x, z);
        a <= x; b <= z;
        exp_q.push_back(ref_mul(x, z));
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
