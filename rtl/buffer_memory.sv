// buffer_memory: the Buffer Memory of one processing element.
//
// A result that is needed in another PE Memory but cannot be written there
// the cycle it leaves the crossbar (no free write port that cycle) is parked
// here and sent later ("indirect" transfer). 16 words of 32 bits.
//
// Everything moves at PE rate (`ce`, high on the last memory clock of a PE
// cycle). At that edge the PE result `wdata` is stored at `wr_addr` when `we`
// is set, and word `rd_addr` is loaded into `rdata`, which the crossbar sees
// during the next PE cycle. A read and a write of the same word at the same
// edge return the old contents.
//
// From the reference design: a 16-word buffer per PE that stores the PE's
// own results and feeds one crossbar input. This design's own choices: one
// read and one write per PE cycle, the registered read and the
// read-during-write behaviour.
module buffer_memory #(
  parameter int unsigned DEPTH = vec_pkg::BUF_DEPTH,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[wr_addr] <= wdata;
      rdata <= mem[rd_addr];
    end
  end

endmodule
