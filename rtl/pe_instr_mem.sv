// pe_instr_mem: Instructions Memory of one processing element.
//
// One 52-bit word per PE cycle (vec_pkg::pe_instr_t) drives the PE Memory and
// the PE: two operand read addresses, two write addresses with their write
// enables, and for an ADD PE the add/subtract select. The four address
// fields are 12 bits wide (three hexadecimal digits) for an 11-bit, 2048-word
// PE Memory; 4 x 12 + 3 bits = 51 bits, padded to the 52-bit word. The
// default depth of 1024 words holds a program of up to 1024 PE cycles.
//
// The host writes words through `host_we`/`host_addr`/`host_wdata` while the
// engine is stopped. The read is registered: `fetch_en` loads word
// `fetch_addr` into `instr` at the clock edge, and `instr` holds it until
// the next fetch.
//
// From the reference design: the 52-bit width, the field contents and
// three-hex-digit addresses. This design's own choices: the order of the
// fields in the word, the 1024-word default depth (sized for the reference
// 987-cycle test case) and the registered fetch.
module pe_instr_mem #(
  parameter int unsigned DEPTH = vec_pkg::PROG_DEPTH,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                        clk,
  input  logic                        host_we,
  input  logic [AW-1:0]               host_addr,
  input  logic [vec_pkg::INSTR_W-1:0] host_wdata,
  input  logic                        fetch_en,
  input  logic [AW-1:0]               fetch_addr,
  output vec_pkg::pe_instr_t          instr
);

  logic [vec_pkg::INSTR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we)  mem[host_addr] <= host_wdata;
    if (fetch_en) instr <= vec_pkg::pe_instr_t'(mem[fetch_addr]);
  end

endmodule
