// vec_engine: fine-grain parallel engine for symbolic multibody equations.
//
// Equations generated for a multibody system are broken into single binary
// operations (add, subtract, multiply) and scheduled offline onto a fixed set
// of pipelined floating-point processing elements. The engine then executes
// that schedule with no run-time decisions: every PE cycle, each block reads
// two operands from its own PE Memory and starts one operation, and the
// crossbar moves results into the PE Memories that will need them, either at
// once (direct) or later through the producing block's Buffer Memory
// (indirect).
//
// Structure (defaults give the 8-PE configuration):
//   * N_ADD compute_blocks with pe_add (PE indices 0 .. N_ADD-1) and N_MUL
//     compute_blocks with pe_mul (N_ADD .. N_PE-1);
//   * one crossbar with 2*N_PE inputs - PE results 0..N_PE-1, then buffer
//     outputs N_PE..2*N_PE-1 - and 2*N_PE outputs - output 2p / 2p+1 feeds
//     write port A / B of PE Memory p;
//   * the Interconnections Memory (xbar_instr_mem) with one select word per
//     PE cycle;
//   * cycle_ctrl, which counts PE cycles and makes the two memory-clock
//     phases of each PE cycle.
//
// A program is the contents of all program memories plus initial data in
// the PE Memories. Timing contract for the scheduler (in PE cycles), for an
// operation whose Instructions Memory word is at cycle t on a PE with S stages:
//   * its operands must have been written in a cycle < t;
//   * its result is a crossbar input (PE result) during cycle t+S;
//   * direct: the Interconnections word of cycle t+S selects it for output
//     2q+k and the Instructions word of cycle t+S+1 of PE q sets wr_k/we_k;
//   * indirect: the Buffer Instructions word of cycle t+S stores it at entry
//     e; the word of a later cycle c reads e; the Interconnections word of
//     cycle c+1 selects input N_PE+p; PE q writes it in cycle c+2.
//
// Host interface (plain signals): while the engine is stopped, `host_we`
// writes `host_wdata` at `host_addr` of the memory chosen by `host_target`
// in block `host_pe` (host_pe is ignored for the Interconnections Memory).
// `host_re` reads word `host_rd_addr` of PE Memory `host_rd_pe`; the data is
// on `host_rdata` one clock later. `start` runs `num_cycles` PE cycles; `busy`
// and `done` report progress (see cycle_ctrl).
//
// Following the reference design: the block structure, the two-phase PE
// Memory access, the crossbar with PE-result and buffer inputs, the memory
// sizes and the PE latencies. This design's own choices: a single clock with
// a phase enable, the host interface, the program-memory fetch timing and
// the exact placement of the crossbar register.
module vec_engine #(
  parameter int unsigned N_ADD      = vec_pkg::N_ADD_DEF,
  parameter int unsigned N_MUL      = vec_pkg::N_MUL_DEF,
  parameter int unsigned ADD_STAGES = vec_pkg::ADD_STAGES_DEF,
  parameter int unsigned MUL_STAGES = vec_pkg::MUL_STAGES_DEF,
  parameter int unsigned MEM_DEPTH  = vec_pkg::PE_MEM_DEPTH,
  parameter int unsigned PROG_DEPTH = vec_pkg::PROG_DEPTH,
  parameter int unsigned BUF_DEPTH  = vec_pkg::BUF_DEPTH,
  localparam int unsigned N_PE = N_ADD + N_MUL,
  localparam int unsigned PAW  = $clog2(PROG_DEPTH),
  localparam int unsigned PEW  = (N_PE > 1) ? $clog2(N_PE) : 1,
  localparam int unsigned SW   = $clog2(2 * N_PE),
  localparam int unsigned FW   = vec_pkg::FIELD_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // run control
  input  logic                      start,
  input  logic [PAW:0]              num_cycles,
  output logic                      busy,
  output logic                      done,
  output logic [PAW-1:0]            cur_cycle,  // PE cycle being executed
  // host load / read-back
  input  logic                      host_we,
  input  vec_pkg::host_target_e     host_target,
  input  logic [PEW-1:0]            host_pe,
  input  logic [FW-1:0]             host_addr,
  input  logic [63:0]               host_wdata,
  input  logic                      host_re,
  input  logic [PEW-1:0]            host_rd_pe,
  input  logic [FW-1:0]             host_rd_addr,
  output logic [31:0]               host_rdata
);
  import vec_pkg::*;

  logic           running, phase, pe_en, fetch_en;
  logic [PAW-1:0] fetch_addr;

  cycle_ctrl #(.PROG_DEPTH(PROG_DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .num_cycles, .busy, .done,
    .running, .phase, .pe_en, .cycle(cur_cycle), .fetch_en, .fetch_addr
  );

  logic [31:0]   xb_in  [2*N_PE];
  logic [31:0]   xb_out [2*N_PE];
  logic [SW-1:0] xb_sel [2*N_PE];
  logic [31:0]   blk_rdata [N_PE];
  logic [PEW-1:0] rd_pe_q;

  for (genvar p = 0; p < int'(N_PE); p++) begin : g_blk
    logic sel_w;
    assign sel_w = host_we && !busy && (host_pe == PEW'(p));
    compute_block #(
      .IS_ADD    (p < int'(N_ADD)),
      .STAGES    ((p < int'(N_ADD)) ? ADD_STAGES : MUL_STAGES),
      .MEM_DEPTH (MEM_DEPTH),
      .PROG_DEPTH(PROG_DEPTH),
      .BUF_DEPTH (BUF_DEPTH)
    ) u_blk (
      .clk, .rst_n, .running, .phase, .pe_en, .fetch_en, .fetch_addr,
      .xin_a   (xb_out[2*p]),
      .xin_b   (xb_out[2*p+1]),
      .result  (xb_in[p]),
      .buf_out (xb_in[N_PE+p]),
      .host_we_mem   (sel_w && host_target == HT_PE_MEM),
      .host_we_instr (sel_w && host_target == HT_INSTR),
      .host_we_binstr(sel_w && host_target == HT_BUF_INSTR),
      .host_re   (host_re && !busy && host_rd_pe == PEW'(p)),
      .host_addr (host_we ? host_addr : host_rd_addr),
      .host_wdata,
      .host_rdata(blk_rdata[p])
    );
  end

  xbar_instr_mem #(.DEPTH(PROG_DEPTH), .N_OUT(2*N_PE), .SEL_W(SW)) u_xmem (
    .clk,
    .host_we   (host_we && !busy && host_target == HT_XBAR),
    .host_addr (host_addr[PAW-1:0]),
    .host_wdata(host_wdata[2*N_PE*SW-1:0]),
    .fetch_en, .fetch_addr,
    .sel       (xb_sel)
  );

  crossbar #(.N_IN(2*N_PE), .N_OUT(2*N_PE), .W(32)) u_xbar (
    .clk, .rst_n, .ce(pe_en), .din(xb_in), .sel(xb_sel), .dout(xb_out)
  );

  always_ff @(posedge clk) if (host_re) rd_pe_q <= host_rd_pe;
  assign host_rdata = blk_rdata[rd_pe_q];

  // The host may only touch the memories while the engine is stopped.
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                busy |-> !(host_we || host_re));

endmodule
