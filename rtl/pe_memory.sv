// pe_memory: the data memory of one processing element (PE Memory).
//
// It holds the initial values and the intermediate results a PE will read,
// 2048 words of 32 bits by default. The memory has two ports, and each port
// may do one access per memory clock, but a PE cycle needs two reads (the
// operands) and two writes (values sent by the crossbar). The memory
// therefore runs two memory clocks per PE cycle and time-multiplexes each
// port: in the read half (`phase` 0) port A reads `rd_addr_a` and port B
// reads `rd_addr_b`; in the write half (`phase` 1) port A writes `wdata_a` to
// `wr_addr_a` if `we_a` and port B writes `wdata_b` to `wr_addr_b` if `we_b`.
// The multiplexed port address is the read address, replaced by the write
// address in the write half when that port writes; with the write enable low
// the port keeps the read address for the whole PE cycle, as in the
// read/write cycle diagram of the reference design.
//
// The operands are registered at the end of the read half and stay on
// `opa`/`opb` for the write half and until the next read, so the PE samples
// them at the edge that ends the PE cycle. A value written in PE cycle w can
// be read by an instruction of PE cycle w+1 or later.
//
// While `running` is low the memory belongs to the host: `host_we` writes
// `host_wdata` at `host_addr` (loading initial data), `host_re` reads
// `host_addr`, the word appearing on `host_rdata` one clock later. Address
// inputs are 12 bits wide (three hexadecimal digits, as in the instruction
// format); only the low log2(DEPTH) bits are used.
module pe_memory #(
  parameter int unsigned DEPTH = vec_pkg::PE_MEM_DEPTH,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned FW = vec_pkg::FIELD_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          running,
  input  logic          phase,
  input  logic [FW-1:0] rd_addr_a,
  input  logic [FW-1:0] rd_addr_b,
  input  logic [FW-1:0] wr_addr_a,
  input  logic [FW-1:0] wr_addr_b,
  input  logic          we_a,
  input  logic          we_b,
  input  logic [31:0]   wdata_a,
  input  logic [31:0]   wdata_b,
  input  logic          host_we,
  input  logic          host_re,
  input  logic [FW-1:0] host_addr,
  input  logic [31:0]   host_wdata,
  output logic [31:0]   host_rdata,
  output logic [31:0]   opa,
  output logic [31:0]   opb
);

  logic [31:0] mem [DEPTH];

  logic [AW-1:0] addr_pa, addr_pb;
  logic          wen_pa, wen_pb, ren_pa, ren_pb;
  logic [31:0]   wd_pa;

  always_comb begin
    if (running) begin
      addr_pa = AW'((phase && we_a) ? wr_addr_a : rd_addr_a);
      wen_pa  = phase & we_a;
      ren_pa  = ~phase;
      wd_pa   = wdata_a;
    end else begin
      addr_pa = AW'(host_addr);
      wen_pa  = host_we;
      ren_pa  = host_re & ~host_we;
      wd_pa   = host_wdata;
    end
    addr_pb = AW'((phase && we_b) ? wr_addr_b : rd_addr_b);
    wen_pb  = running & phase & we_b;
    ren_pb  = running & ~phase;
  end

  always_ff @(posedge clk) begin
    if (wen_pa) mem[addr_pa] <= wd_pa;
    if (wen_pb) mem[addr_pb] <= wdata_b;
    if (ren_pa) opa <= mem[addr_pa];
    if (ren_pb) opb <= mem[addr_pb];
  end

  assign host_rdata = opa;

  // Two writes to one word in the same half-cycle have no defined winner.
  a_wr_collide: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(wen_pa && wen_pb && addr_pa == addr_pb));

endmodule
