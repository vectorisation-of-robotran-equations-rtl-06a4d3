// cycle_ctrl: program sequencer and PE-cycle generator.
//
// The design runs from one clock, the memory clock. A PE cycle lasts two
// memory clocks: `phase` 0 is the read half, in which every PE Memory reads
// the two operands of the current instruction, and `phase` 1 is the write
// half, in which every PE Memory writes up to two values arriving from the
// crossbar. `phase` is a register that toggles on every memory clock edge,
// which is how the slower PE clock is derived from the memory clock in the
// reference design; here it is used as the clock enable `pe_en` (high in the
// write half, so PE-rate registers move on the edge that ends a PE cycle)
// instead of as a second clock.
//
// `cycle` counts PE cycles from 0 to num_cycles-1 and is also the address of
// the program memories. Program memories have a registered read, so the
// controller fetches word 0 one clock before the run starts (PRIME) and then
// fetches word cycle+1 at the end of every PE cycle; every program memory
// output therefore holds the word of the current PE cycle for the whole cycle.
//
// Interface: a one-clock `start` pulse (ignored while busy) begins a run of
// `num_cycles` PE cycles; `busy` is high from the clock after start until the
// last PE cycle has ended, then `done` stays high until the next start.
//
// From the reference design: the two memory clocks per PE cycle (read half,
// then write half) and the cycle counter. This design's own choices: one
// clock with a phase enable instead of a derived clock, the prefetch clock
// and the start/busy/done handshake.
module cycle_ctrl #(
  parameter int unsigned PROG_DEPTH = vec_pkg::PROG_DEPTH,
  localparam int unsigned AW = $clog2(PROG_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW:0]   num_cycles,   // 0 .. PROG_DEPTH
  output logic          busy,
  output logic          done,
  output logic          running,      // PE cycles are being executed
  output logic          phase,        // 0: read half, 1: write half
  output logic          pe_en,        // last memory clock of a PE cycle
  output logic [AW-1:0] cycle,        // current PE cycle
  output logic          fetch_en,     // program memories load fetch_addr
  output logic [AW-1:0] fetch_addr
);

  typedef enum logic [1:0] {S_IDLE, S_PRIME, S_RUN, S_DONE} state_e;
  state_e state;
  logic [AW:0] last;

  assign running    = (state == S_RUN);
  assign busy       = (state == S_PRIME) || (state == S_RUN);
  assign done       = (state == S_DONE);
  assign pe_en      = running && phase;
  assign fetch_en   = (state == S_PRIME) || pe_en;
  assign fetch_addr = (state == S_PRIME) ? '0 : cycle + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      phase <= 1'b0;
      cycle <= '0;
      last  <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE: begin
          phase <= 1'b0;
          if (start) begin
            cycle <= '0;
            last  <= num_cycles - 1'b1;
            state <= (num_cycles == '0) ? S_DONE : S_PRIME;
          end
        end
        S_PRIME: state <= S_RUN;
        S_RUN: begin
          phase <= ~phase;
          if (phase) begin
            if ({1'b0, cycle} == last) state <= S_DONE;
            else                       cycle <= cycle + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The program may not be longer than the program memories.
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
                          (start && !busy) |-> (num_cycles <= (AW+1)'(PROG_DEPTH)));

endmodule
