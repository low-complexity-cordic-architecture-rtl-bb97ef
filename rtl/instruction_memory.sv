// instruction_memory: program store of the accelerator.
//
// DEPTH words of the 32-bit instr_t encoding (see mimo_pkg). Each word names
// the operation, which slots and lanes the core-input switch selects and how
// it arranges them, and where the memory-input switch places the result, so
// the program controls both switches and, through the opcode, which units
// and memories are enabled. The controller reads it synchronously (rd_data
// valid the cycle after rd_addr is presented); the host writes it.
// The depth is this design's choice.
module instruction_memory
  import mimo_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                      clk,
  input  logic [$clog2(DEPTH)-1:0]  rd_addr,
  output instr_t                    rd_data,
  input  logic                      wr_en,
  input  logic [$clog2(DEPTH)-1:0]  wr_addr,
  input  instr_t                    wr_data
);

  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
