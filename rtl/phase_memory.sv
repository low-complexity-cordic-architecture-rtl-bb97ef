// phase_memory: store for the outputs of the rotation unit.
//
// One complex entry per subchannel, addressed by the controller's subchannel
// counter. The rotation unit's output vector is written here on every
// rotation; a later rotation may read its input vector back from here, so a
// chain of rotations can be applied per subchannel without passing through
// the data memory. Core read is synchronous (rd_data valid the cycle after
// addr); the host reads combinationally. Entry size and depth are this
// design's choices.
module phase_memory
  import mimo_pkg::*;
#(
  parameter int NSC = 64
) (
  input  logic                    clk,
  input  logic [$clog2(NSC)-1:0]  addr,
  input  logic                    wr_en,
  input  cplx_t                   wr_data,
  output cplx_t                   rd_data,
  input  logic [$clog2(NSC)-1:0]  host_addr,
  output cplx_t                   host_rdata
);

  cplx_t mem [NSC];

  always_ff @(posedge clk) begin
    if (wr_en) mem[addr] <= wr_data;
    rd_data <= mem[addr];
  end

  assign host_rdata = mem[host_addr];

endmodule
