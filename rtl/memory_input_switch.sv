// memory_input_switch: places processing-core results into the row that is
// written back to the data memory.
//
// The row read for the current subchannel passes through unchanged except
// for the destination slot dst: a vector result (ADD, SUB, MUL, RECIP)
// replaces the lanes enabled in wmask, a scalar result (DOT, ROT) replaces
// lane dst_lane only. Which results are vectors and how they are placed is
// this design's choice. Purely combinational.
module memory_input_switch
  import mimo_pkg::*;
#(
  parameter int NRX   = 4,
  parameter int NSLOT = 8
) (
  input  cplx_t [NSLOT-1:0][NRX-1:0]  row,
  input  instr_t                      instr,
  input  cplx_t [NRX-1:0]             vec_res,
  input  cplx_t                       scal_res,
  output cplx_t [NSLOT-1:0][NRX-1:0]  row_out
);

  logic scalar;
  logic [$clog2(NSLOT)-1:0] dst;

  always_comb begin
    scalar  = (instr.op == OP_DOT) || (instr.op == OP_ROT);
    dst     = $clog2(NSLOT)'(instr.dst);
    row_out = row;
    for (int i = 0; i < NRX; i++) begin
      if (scalar) begin
        if (i == int'(instr.dst_lane)) row_out[dst][i] = scal_res;
      end else if (instr.wmask[i]) begin
        row_out[dst][i] = vec_res[i];
      end
    end
  end

endmodule
