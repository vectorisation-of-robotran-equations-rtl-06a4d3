// buffer_instr_mem: Buffer Instructions memory of one processing element.
//
// One word per PE cycle (vec_pkg::buf_instr_t, 9 bits) drives the Buffer
// Memory: the address read and offered to the crossbar in the next PE cycle,
// and the address at which this cycle's PE result is stored with its write
// enable. Loading and fetching work as in pe_instr_mem: the host writes words
// while the engine is stopped, and `fetch_en` loads word `fetch_addr` into the
// registered output `instr`.
//
// From the reference design: a separate instruction memory per Buffer
// Memory, holding a read address, a write address and a write enable. This
// design's own choices: the 9-bit width (two 4-bit addresses for 16 entries
// and the enable; the reference quotes 8 bits, which cannot hold them), the
// field order and the registered fetch.
module buffer_instr_mem #(
  parameter int unsigned DEPTH = vec_pkg::PROG_DEPTH,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                            clk,
  input  logic                            host_we,
  input  logic [AW-1:0]                   host_addr,
  input  logic [vec_pkg::BUF_INSTR_W-1:0] host_wdata,
  input  logic                            fetch_en,
  input  logic [AW-1:0]                   fetch_addr,
  output vec_pkg::buf_instr_t             instr
);

  logic [vec_pkg::BUF_INSTR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we)  mem[host_addr] <= host_wdata;
    if (fetch_en) instr <= vec_pkg::buf_instr_t'(mem[fetch_addr]);
  end

endmodule
