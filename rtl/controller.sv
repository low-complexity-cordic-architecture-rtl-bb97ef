// controller: program sequencer and address generator of the accelerator.
//
// Runs the program in the instruction memory from address 0 when start is
// pulsed. Every instruction is applied to all NSC subchannels in turn before
// the next one is fetched. For each subchannel the controller reads the
// data-memory row and the phase-memory entry at address sc, starts the
// processing core, stalls until the core reports done, and then writes the
// row back (and, for a rotation, the phase-memory entry). NOP is skipped and
// HALT ends the program with a one-cycle done pulse.
//
// States and cycle counts (the FSM is this design's choice):
//   FETCH, DECODE                  2 cycles per instruction
//   READ, EXEC, WAIT.., WRITE      3 + L cycles per subchannel, L being the
//                                  unit latency (2 ADD/SUB/MUL/DOT,
//                                  18 RECIP, N_ITER + 2 ROT)
// done is high in the cycle 1 + 2 * (instructions fetched, HALT included)
// + NSC * sum(3 + L) after the cycle in which start was high.
// The program counter wraps at the end of the instruction memory.
module controller
  import mimo_pkg::*;
#(
  parameter int NSC        = 64,
  parameter int IMEM_DEPTH = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic [$clog2(IMEM_DEPTH)-1:0] imem_addr,
  input  instr_t                        instr,
  output instr_t                        cur_instr,
  output logic [$clog2(NSC)-1:0]        sc,
  output logic                          dmem_rd_en,
  output logic                          core_start,
  input  logic                          core_done,
  output logic                          dmem_wr_en,
  output logic                          pmem_wr_en,
  output logic                          busy,
  output logic                          done
);

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_DECODE, S_READ, S_EXEC, S_WAIT, S_WRITE
  } state_e;

  state_e state;
  logic [$clog2(IMEM_DEPTH)-1:0] pc;

  assign imem_addr  = pc;
  assign busy       = (state != S_IDLE);
  assign dmem_rd_en = (state == S_READ);
  assign core_start = (state == S_EXEC);
  assign dmem_wr_en = (state == S_WRITE);
  assign pmem_wr_en = (state == S_WRITE) && (cur_instr.op == OP_ROT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pc        <= '0;
      sc        <= '0;
      cur_instr <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (start) begin
            pc    <= '0;
            state <= S_FETCH;
          end
        S_FETCH: state <= S_DECODE;   // instruction memory read latency
        S_DECODE: begin
          cur_instr <= instr;
          sc        <= '0;
          unique case (instr.op)
            OP_HALT: begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
            OP_ADD, OP_SUB, OP_MUL, OP_DOT, OP_RECIP, OP_ROT:
              state <= S_READ;
            default: begin             // NOP and unused codes
              pc    <= pc + 1'b1;
              state <= S_FETCH;
            end
          endcase
        end
        S_READ:  state <= S_EXEC;
        S_EXEC:  state <= S_WAIT;
        S_WAIT:  if (core_done) state <= S_WRITE;
        S_WRITE: begin
          if (sc == $clog2(NSC)'(NSC - 1)) begin
            pc    <= pc + 1'b1;
            state <= S_FETCH;
          end else begin
            sc    <= sc + 1'b1;
            state <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
