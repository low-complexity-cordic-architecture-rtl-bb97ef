// core_input_switch: operand multiplexer in front of the processing core.
//
// From the subchannel row just read it selects vector A (slot src_a) and
// vector B (slot src_b) and arranges B as the instruction asks: conj_b
// conjugates every element, bcast_b copies element lane_b to all lanes
// (broadcast happens first, then conjugation). For a rotation it also
// selects the vector to rotate, element lane_a of A or, with rot_chain, the
// phase memory entry, and the angle, the real part of element lane_b of B.
// The set of arrangements is this design's choice. Purely combinational.
module core_input_switch
  import mimo_pkg::*;
#(
  parameter int NRX   = 4,
  parameter int NSLOT = 8
) (
  input  cplx_t [NSLOT-1:0][NRX-1:0]  row,
  input  instr_t                      instr,
  input  cplx_t                       pmem_data,
  output cplx_t [NRX-1:0]             op_a,
  output cplx_t [NRX-1:0]             op_b,
  output cplx_t                       rot_in,
  output real_t                       rot_angle
);

  cplx_t [NRX-1:0] va, vb;
  cplx_t           eb;

  always_comb begin
    va = row[$clog2(NSLOT)'(instr.src_a)];
    vb = row[$clog2(NSLOT)'(instr.src_b)];
    eb = vb[$clog2(NRX)'(instr.lane_b)];
    op_a = va;
    for (int i = 0; i < NRX; i++) begin
      op_b[i] = instr.bcast_b ? eb : vb[i];
      if (instr.conj_b) op_b[i].im = -op_b[i].im;
    end
    rot_in    = instr.rot_chain ? pmem_data : va[$clog2(NRX)'(instr.lane_a)];
    rot_angle = eb.re;
  end

endmodule
