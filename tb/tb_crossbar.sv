// tb_crossbar: test of the 16 x 16 crossbar switch.
// Each PE cycle drives random data on all inputs and random selects on all
// outputs (including many outputs on one input, a broadcast), then checks
// that every output shows its selected input one cycle later and holds
// while the PE-cycle enable is low.
//
// The 16 x 16 size and the broadcast capability follow the reference design;
// the one-cycle output register checked here is this design's own choice. A
// watchdog ends a hung run with a failure.
module tb_crossbar;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, ce = 0;
  logic [31:0] din [N];
  logic [3:0]  sel [N];
  logic [31:0] dout [N];
  logic [31:0] exp_o [N];
  int checks = 0, failures = 0, bcast = 0;

  crossbar #(.N_IN(N), .N_OUT(N), .W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin din[i] = 0; sel[i] = 0; exp_o[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ce = ($urandom_range(5) != 0);
      for (int i = 0; i < N; i++) din[i] = $urandom;
      for (int o = 0; o < N; o++)
        sel[o] = (t % 5 == 0) ? 4'(t % N) : 4'($urandom_range(N - 1));
      if (t % 5 == 0) bcast++;
      if (ce) for (int o = 0; o < N; o++) exp_o[o] = din[sel[o]];
      @(posedge clk);
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (dout[o] !== exp_o[o]) begin
          failures++;
          if (failures < 10) $display("t %0d out %0d: got %h expected %h", t, o, dout[o], exp_o[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
