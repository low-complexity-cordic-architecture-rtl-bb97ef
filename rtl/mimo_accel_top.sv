// mimo_accel_top: programmable MIMO decoding accelerator for OFDM receivers.
//
// A complex-vector processor whose program runs once over every OFDM
// subchannel. The controller fetches an instruction from the instruction
// memory and, for each subchannel, reads that subchannel's row from the data
// memory; the core-input switch picks and arranges the operand vectors; the
// processing core (vector add/subtract, complex multiply and dot product,
// reciprocal, circular and hyperbolic CORDIC rotation) computes; the memory-input switch places the
// result in the row, which is written back. Rotation results also go to the
// phase memory, from which a later rotation may take its input.
//
// Host interface (this design's choice): while busy is low the host writes
// instructions (host_imem_*) and data elements (host_dmem_*), and reads data
// and phase-memory entries combinationally. start runs the program from
// address 0; done pulses when it reaches HALT.
//
// Parameters: NRX receive antennas (vector length, at most 4 with the 32-bit
// instruction encoding), NSLOT vectors per subchannel row, NSC subchannels,
// IMEM_DEPTH instructions, N_ITER CORDIC iterations.
module mimo_accel_top
  import mimo_pkg::*;
#(
  parameter int NRX        = 4,
  parameter int NSLOT      = 8,
  parameter int NSC        = 64,
  parameter int IMEM_DEPTH = 64,
  parameter int N_ITER     = 11
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  input  logic                          host_imem_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] host_imem_addr,
  input  instr_t                        host_imem_wdata,
  input  logic                          host_dmem_we,
  input  logic [$clog2(NSC)-1:0]        host_dmem_sc,
  input  logic [$clog2(NSLOT)-1:0]      host_dmem_slot,
  input  logic [$clog2(NRX)-1:0]        host_dmem_lane,
  input  cplx_t                         host_dmem_wdata,
  output cplx_t                         host_dmem_rdata,
  input  logic [$clog2(NSC)-1:0]        host_pmem_sc,
  output cplx_t                         host_pmem_rdata
);

  logic [$clog2(IMEM_DEPTH)-1:0] imem_addr;
  instr_t                        instr, cur_instr;
  logic [$clog2(NSC)-1:0]        sc;
  logic                          dmem_rd_en, dmem_wr_en, pmem_wr_en;
  logic                          core_start, core_done;
  cplx_t [NSLOT-1:0][NRX-1:0]    row, row_out;
  cplx_t [NRX-1:0]               op_a, op_b, vec_res;
  cplx_t                         rot_in, scal_res, pmem_rdata;
  real_t                         rot_angle;

  instruction_memory #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .rd_addr(imem_addr), .rd_data(instr),
    .wr_en(host_imem_we), .wr_addr(host_imem_addr), .wr_data(host_imem_wdata)
  );

  controller #(.NSC(NSC), .IMEM_DEPTH(IMEM_DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .imem_addr, .instr, .cur_instr, .sc,
    .dmem_rd_en, .core_start, .core_done, .dmem_wr_en, .pmem_wr_en,
    .busy, .done
  );

  data_memory #(.NRX(NRX), .NSLOT(NSLOT), .NSC(NSC)) u_dmem (
    .clk, .rd_en(dmem_rd_en), .rd_addr(sc), .rd_row(row),
    .wr_en(dmem_wr_en), .wr_addr(sc), .wr_row(row_out),
    .host_we(host_dmem_we), .host_sc(host_dmem_sc), .host_slot(host_dmem_slot),
    .host_lane(host_dmem_lane), .host_wdata(host_dmem_wdata), .host_rdata(host_dmem_rdata)
  );

  core_input_switch #(.NRX(NRX), .NSLOT(NSLOT)) u_cis (
    .row, .instr(cur_instr), .pmem_data(pmem_rdata),
    .op_a, .op_b, .rot_in, .rot_angle
  );

  processing_core #(.NRX(NRX), .N_ITER(N_ITER)) u_core (
    .clk, .rst_n, .start(core_start), .op(cur_instr.op), .op_a, .op_b,
    .rot_in, .rot_angle, .rot_hyp(cur_instr.hyp), .done(core_done), .vec_res, .scal_res
  );

  memory_input_switch #(.NRX(NRX), .NSLOT(NSLOT)) u_mis (
    .row, .instr(cur_instr), .vec_res, .scal_res, .row_out
  );

  phase_memory #(.NSC(NSC)) u_pmem (
    .clk, .addr(sc), .wr_en(pmem_wr_en), .wr_data(scal_res), .rd_data(pmem_rdata),
    .host_addr(host_pmem_sc), .host_rdata(host_pmem_rdata)
  );

endmodule
