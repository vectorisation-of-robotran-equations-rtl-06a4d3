// xbar_instr_mem: Interconnections Memory.
//
// One word per PE cycle holds the input select of every crossbar output:
// N_OUT fields of SEL_W bits, field o in bits [o*SEL_W +: SEL_W]. With 8 PEs
// the crossbar has 16 outputs (two PE Memory write ports per PE) and 16
// inputs (8 PE results and 8 buffer outputs), so a word is 16 x 4 = 64 bits
// and 1024 words hold 65536 bits.
//
// Loading and fetching work as in pe_instr_mem: host writes while stopped,
// registered read on `fetch_en`; `sel` holds the word of the current cycle.
//
// From the reference design: one select word per cycle of
// 2N x log2(2N) bits (64 bits for N = 8). This design's own choices: the
// field order, the depth and the registered fetch.
module xbar_instr_mem #(
  parameter int unsigned DEPTH = vec_pkg::PROG_DEPTH,
  parameter int unsigned N_OUT = 16,
  parameter int unsigned SEL_W = vec_pkg::XBAR_SEL_W,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   host_we,
  input  logic [AW-1:0]          host_addr,
  input  logic [N_OUT*SEL_W-1:0] host_wdata,
  input  logic                   fetch_en,
  input  logic [AW-1:0]          fetch_addr,
  output logic [SEL_W-1:0]       sel [N_OUT]
);

  logic [N_OUT*SEL_W-1:0] mem [DEPTH];
  logic [N_OUT*SEL_W-1:0] q;

  always_ff @(posedge clk) begin
    if (host_we)  mem[host_addr] <= host_wdata;
    if (fetch_en) q <= mem[fetch_addr];
  end

  always_comb
    for (int o = 0; o < int'(N_OUT); o++) sel[o] = q[o*SEL_W +: SEL_W];

endmodule
