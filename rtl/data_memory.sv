// data_memory: the operand and result store of the accelerator.
//
// One row per OFDM subchannel; a row holds NSLOT complex vectors of NRX
// elements, the whole chunk of data the program works on for that
// subchannel. The core side reads and writes whole rows: a read is
// synchronous (rd_row is valid the cycle after rd_en and holds until the next
// read), a write stores wr_row at the clock edge. The host side writes one
// complex element at a time and reads one element combinationally; it is
// meant for use while the program is idle. A core write and a host write to
// the same row in the same cycle leave the core's row (core has priority).
//
// The row organisation (NSLOT=8 vectors) and the depth (NSC=64 subchannels)
// are this design's choices.
module data_memory
  import mimo_pkg::*;
#(
  parameter int NRX   = 4,
  parameter int NSLOT = 8,
  parameter int NSC   = 64
) (
  input  logic                        clk,
  // core side
  input  logic                        rd_en,
  input  logic [$clog2(NSC)-1:0]      rd_addr,
  output cplx_t [NSLOT-1:0][NRX-1:0]  rd_row,
  input  logic                        wr_en,
  input  logic [$clog2(NSC)-1:0]      wr_addr,
  input  cplx_t [NSLOT-1:0][NRX-1:0]  wr_row,
  // host side
  input  logic                        host_we,
  input  logic [$clog2(NSC)-1:0]      host_sc,
  input  logic [$clog2(NSLOT)-1:0]    host_slot,
  input  logic [$clog2(NRX)-1:0]      host_lane,
  input  cplx_t                       host_wdata,
  output cplx_t                       host_rdata
);

  cplx_t [NSLOT-1:0][NRX-1:0] mem [NSC];

  always_ff @(posedge clk) begin
    if (host_we && !(wr_en && wr_addr == host_sc))
      mem[host_sc][host_slot][host_lane] <= host_wdata;
    if (wr_en)
      mem[wr_addr] <= wr_row;
    if (rd_en)
      rd_row <= mem[rd_addr];
  end

  assign host_rdata = mem[host_sc][host_slot][host_lane];

endmodule
