// compute_block: one ADD or MULTI block of the engine.
//
// A block groups everything that belongs to one processing element:
//
//   Instructions Memory -> PE Memory -> PE -> result (to the crossbar)
//                                         \-> Buffer Memory -> buffer output
//   Buffer Instructions -------------------/   (to the crossbar)
//
// IS_ADD selects the PE: pe_add (with the add/subtract bit of the instruction
// word) or pe_mul. The block's two PE Memory write ports take their data from
// the crossbar (`xin_a`, `xin_b`); the block offers its PE result `result` and
// its buffer word `buf_out` as crossbar inputs.
//
// Timing of one operation, in PE cycles, for an instruction of cycle t:
//   t          read half: operands read from the PE Memory;
//              end of cycle: operands enter the PE;
//   t+S        `result` valid (S = PE stages); the Buffer Instructions word
//              of cycle t+S may store it in the Buffer Memory;
//   t+S+1      crossbar output carries it, a PE Memory writes it
//              (direct transfer), readable from cycle t+S+2 on.
// So an operation costs S+2 cycles: 12 for the 10-stage adder and 7 for the
// 5-stage multiplier. A buffered result read from the buffer by the word of
// cycle c is on `buf_out` in cycle c+1 and can be written to a PE Memory in
// cycle c+2 (indirect transfer).
//
// Host access (engine stopped): `host_we_mem` loads initial data into the PE
// Memory, `host_we_instr` / `host_we_binstr` load program words, `host_re`
// reads the PE Memory with the word on `host_rdata` one clock later.
//
// From the reference design: the contents of a block and how they connect,
// and one common block for both PE kinds, differing only in the
// add/subtract select. This design's own choices: the host access and the
// exact cycle at which each register sits within the S+2 cycle budget.
module compute_block #(
  parameter bit          IS_ADD     = 1'b1,
  parameter int unsigned STAGES     = IS_ADD ? vec_pkg::ADD_STAGES_DEF : vec_pkg::MUL_STAGES_DEF,
  parameter int unsigned MEM_DEPTH  = vec_pkg::PE_MEM_DEPTH,
  parameter int unsigned PROG_DEPTH = vec_pkg::PROG_DEPTH,
  parameter int unsigned BUF_DEPTH  = vec_pkg::BUF_DEPTH,
  localparam int unsigned PAW = $clog2(PROG_DEPTH),
  localparam int unsigned FW  = vec_pkg::FIELD_W
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // sequencing from cycle_ctrl
  input  logic                            running,
  input  logic                            phase,
  input  logic                            pe_en,
  input  logic                            fetch_en,
  input  logic [PAW-1:0]                  fetch_addr,
  // crossbar side
  input  logic [31:0]                     xin_a,
  input  logic [31:0]                     xin_b,
  output logic [31:0]                     result,
  output logic [31:0]                     buf_out,
  // host side
  input  logic                            host_we_mem,
  input  logic                            host_we_instr,
  input  logic                            host_we_binstr,
  input  logic                            host_re,
  input  logic [FW-1:0]                   host_addr,
  input  logic [63:0]                     host_wdata,
  output logic [31:0]                     host_rdata
);
  import vec_pkg::*;

  pe_instr_t  instr;
  buf_instr_t binstr;
  logic [31:0] opa, opb;

  pe_instr_mem #(.DEPTH(PROG_DEPTH)) u_instr (
    .clk, .host_we(host_we_instr), .host_addr(host_addr[PAW-1:0]),
    .host_wdata(host_wdata[INSTR_W-1:0]), .fetch_en, .fetch_addr, .instr
  );

  pe_memory #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk, .rst_n, .running, .phase,
    .rd_addr_a(instr.rd_a), .rd_addr_b(instr.rd_b),
    .wr_addr_a(instr.wr_a), .wr_addr_b(instr.wr_b),
    .we_a(instr.we_a), .we_b(instr.we_b),
    .wdata_a(xin_a), .wdata_b(xin_b),
    .host_we(host_we_mem), .host_re, .host_addr,
    .host_wdata(host_wdata[31:0]), .host_rdata,
    .opa, .opb
  );

  if (IS_ADD) begin : g_add
    pe_add #(.STAGES(STAGES)) u_pe (
      .clk, .rst_n, .ce(pe_en), .a(opa), .b(opb), .sub(instr.op_sub), .y(result)
    );
  end else begin : g_mul
    pe_mul #(.STAGES(STAGES)) u_pe (
      .clk, .rst_n, .ce(pe_en), .a(opa), .b(opb), .y(result)
    );
  end

  buffer_instr_mem #(.DEPTH(PROG_DEPTH)) u_binstr (
    .clk, .host_we(host_we_binstr), .host_addr(host_addr[PAW-1:0]),
    .host_wdata(host_wdata[BUF_INSTR_W-1:0]), .fetch_en, .fetch_addr, .instr(binstr)
  );

  buffer_memory #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .ce(pe_en), .we(binstr.we), .wr_addr(binstr.wr), .wdata(result),
    .rd_addr(binstr.rd), .rdata(buf_out)
  );

endmodule
