// crossbar: N_IN x N_OUT crossbar switch between the blocks.
//
// Each output selects any one input with its own select field, so one input
// may feed several outputs in the same cycle (a broadcast) while every output
// has exactly one source. In the engine the inputs are the PE results
// (0 .. N_PE-1) followed by the buffer outputs (N_PE .. 2*N_PE-1), and output
// 2p / 2p+1 feeds write port A / B of PE Memory p.
//
// The outputs are registered at PE rate (`ce`): a selection made in PE cycle
// c is presented during PE cycle c+1, the cycle in which the PE Memories
// write it. This register is the one PE cycle of interconnect latency.
//
// From the reference design: a 16 x 16 crossbar built from one multiplexer
// per output, with PE results and buffer outputs as inputs. This design's
// own choices: the port numbering and the placement of the output register.
module crossbar #(
  parameter int unsigned N_IN  = 16,
  parameter int unsigned N_OUT = 16,
  parameter int unsigned W     = 32,
  localparam int unsigned SW   = $clog2(N_IN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic [W-1:0]  din  [N_IN],
  input  logic [SW-1:0] sel  [N_OUT],
  output logic [W-1:0]  dout [N_OUT]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < int'(N_OUT); o++) dout[o] <= '0;
    end else if (ce) begin
      for (int o = 0; o < int'(N_OUT); o++) dout[o] <= din[sel[o]];
    end
  end

endmodule
