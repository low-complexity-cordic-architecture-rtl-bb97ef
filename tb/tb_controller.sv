// tb_controller: self-checking test of the program sequencer.
// A small program (ADD, NOP, ROT, RECIP, DOT, HALT) runs against a model
// of the instruction memory and of a processing core whose done comes
// after the unit latency of the operation. Checked: every operation visits
// all NSC subchannels in order (reads, starts and write-backs), the phase
// memory is written only by ROT, the controller waits (stalls) for done and
// writes back only after it,
// the total cycle count matches 1 + 2 per instruction + (3 + L) per
// subchannel, from the start cycle to the done cycle,
// and done pulses once at HALT.
module tb_controller;
  import mimo_pkg::*;
  localparam int NSC = 16, IMEM_DEPTH = 64, N_ITER = 11;
  logic clk = 0, rst_n = 0, start = 0, core_done = 0;
  logic [5:0] imem_addr;
  instr_t instr, cur_instr;
  logic [3:0] sc;
  logic dmem_rd_en, core_start, dmem_wr_en, pmem_wr_en, busy, done;
  instr_t prog [IMEM_DEPTH];
  int checks = 0, failures = 0, cyc = 0;
  int reads = 0, starts = 0, writes = 0, pwrites = 0, dones = 0, stall_cycles = 0;
  int next_sc = 0;
  int pending = -1;
  bit waiting = 0;
  bit got_done = 0;

  controller #(.NSC(NSC), .IMEM_DEPTH(IMEM_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int latency(opcode_e o);
    case (o)
      OP_RECIP: return 18;
      OP_ROT:   return N_ITER + 2;
      default:  return 2;
    endcase
  endfunction

  // instruction memory model, one-cycle read
  always_ff @(posedge clk) instr <= prog[imem_addr];

  // core model: done 'latency' edges after the start edge
  always @(posedge clk) begin
    cyc <= cyc + 1;
    core_done <= 1'b0;
    if (pending > 0) begin
      pending = pending - 1;
      if (pending == 0) begin core_done <= 1'b1; pending = -1; end
    end
    if (core_start) pending = latency(cur_instr.op) - 1;
    if (pending == 0) begin core_done <= 1'b1; pending = -1; end
    if (waiting && !core_done) stall_cycles++;
    if (core_done) begin waiting = 0; got_done = 1; end
    if (core_start) waiting = 1;
    if (dmem_rd_en) begin
      reads++;
      checks++;
      if (int'(sc) != next_sc) begin failures++; $display("sc %0d expected %0d", sc, next_sc); end
    end
    if (core_start) starts++;
    if (dmem_wr_en) begin
      writes++;
      checks++;
      if (!got_done) begin failures++; $display("write-back before the core was done"); end
      got_done = 0;
      next_sc = (next_sc + 1) % NSC;
    end
    if (pmem_wr_en) begin
      pwrites++;
      checks++;
      if (cur_instr.op != OP_ROT) failures++;
    end
    if (done && rst_n) dones++;
  end

  initial begin
    int t0, t1, expect_cycles;
    opcode_e seq [5] = '{OP_ADD, OP_NOP, OP_ROT, OP_RECIP, OP_DOT};
    for (int i = 0; i < IMEM_DEPTH; i++) prog[i] = '0;
    expect_cycles = 0;
    for (int i = 0; i < 5; i++) begin
      prog[i].op = seq[i];
      expect_cycles += 2;
      if (seq[i] != OP_NOP) expect_cycles += NSC * (3 + latency(seq[i]));
    end
    prog[5].op = OP_HALT;
    expect_cycles += 2 + 1;   // HALT, and the cycle in which start is seen
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    t1 = cyc;
    @(negedge clk);
    checks += 7;
    if (t1 - t0 != expect_cycles) begin failures++; $display("cycles %0d expected %0d", t1 - t0, expect_cycles); end
    if (reads != 4 * NSC) begin failures++; $display("reads %0d", reads); end
    if (starts != 4 * NSC) begin failures++; $display("starts %0d", starts); end
    if (writes != 4 * NSC) begin failures++; $display("writes %0d", writes); end
    if (pwrites != NSC) begin failures++; $display("pwrites %0d", pwrites); end
    if (dones != 1 || busy) begin failures++; $display("done/busy"); end
    if (stall_cycles == 0) begin failures++; $display("no stall seen"); end
    $display("stall cycles %0d", stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
