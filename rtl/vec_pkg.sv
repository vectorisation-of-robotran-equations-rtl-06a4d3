// vec_pkg: sizes, instruction formats and host-access types shared by the
// vectorised floating-point engine.
//
// The engine runs a statically scheduled list of single-precision additions,
// subtractions and multiplications on a set of pipelined processing elements
// (PEs). Every PE owns a data memory (PE Memory) driven word by word from an
// instruction memory, a small buffer memory for results that cannot be written
// at once, and one output of a crossbar. All memories hold one word per PE
// cycle, so a program is simply the contents of those memories.
//
// Sizes follow the 8-PE configuration of the reference implementation: 4 ADD
// and 4 MULTI PEs, 2048-word PE Memories addressed with three hexadecimal
// digits, 16-word buffers, 10-stage adders and 5-stage multipliers, and
// program memories 1024 words deep (enough for the 987-cycle schedule of the
// 23-dof railway-bogie). The host-access types are this design's own choice.
package vec_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_ADD_DEF      = 4;     // ADD PEs
  localparam int unsigned N_MUL_DEF      = 4;     // MULTI PEs
  localparam int unsigned PE_MEM_DEPTH   = 2048;  // words per PE Memory
  localparam int unsigned PE_ADDR_W      = 11;    // log2(PE_MEM_DEPTH)
  localparam int unsigned FIELD_W        = 12;    // address field: 3 hex digits
  localparam int unsigned PROG_DEPTH     = 1024;  // PE cycles per program
  localparam int unsigned PROG_ADDR_W    = 10;
  localparam int unsigned BUF_DEPTH      = 16;    // words per Buffer Memory
  localparam int unsigned BUF_ADDR_W     = 4;
  localparam int unsigned ADD_STAGES_DEF = 10;    // ADD PE pipeline depth
  localparam int unsigned MUL_STAGES_DEF = 5;     // MULTI PE pipeline depth
  localparam int unsigned XBAR_SEL_W     = 4;     // log2(16 crossbar inputs)
  localparam int unsigned INSTR_W        = 52;    // Instructions Memory width
  localparam int unsigned BUF_INSTR_W    = 9;     // Buffer Instructions width

  // Extra PE cycles an operation costs on top of the PE pipeline: one through
  // the crossbar register and one to write the PE Memory.
  localparam int unsigned XFER_CYCLES    = 2;

  // ----------------------------------------------------- instruction words
  // Instructions Memory word (52 bits). Bit 51 is unused padding.
  typedef struct packed {
    logic                pad;
    logic                op_sub;  // ADD PE only: 1 = a - b, 0 = a + b
    logic                we_b;    // write port B in the write half-cycle
    logic                we_a;    // write port A in the write half-cycle
    logic [FIELD_W-1:0]  wr_b;    // port B write address
    logic [FIELD_W-1:0]  wr_a;    // port A write address
    logic [FIELD_W-1:0]  rd_b;    // operand b read address
    logic [FIELD_W-1:0]  rd_a;    // operand a read address
  } pe_instr_t;

  // Buffer Instructions word (9 bits).
  typedef struct packed {
    logic                  we;    // store this cycle's PE result at wr
    logic [BUF_ADDR_W-1:0] wr;
    logic [BUF_ADDR_W-1:0] rd;    // word offered to the crossbar next cycle
  } buf_instr_t;

  // --------------------------------------------------------- host access
  // Which memory a host write goes to.
  typedef enum logic [1:0] {
    HT_PE_MEM    = 2'd0,   // initial data into a PE Memory (32 bits)
    HT_INSTR     = 2'd1,   // Instructions Memory word (52 bits)
    HT_BUF_INSTR = 2'd2,   // Buffer Instructions word (9 bits)
    HT_XBAR      = 2'd3    // Interconnections Memory word (64 bits)
  } host_target_e;

endpackage
