// tb_mimo_accel_top: end-to-end test of the accelerator at its default size
// (NRX = 4, NSLOT = 8, NSC = 64, N_ITER = 11).
//
// The host port loads random data into slots 0..3 of every subchannel and a
// ten-word program:
//   0 ADD   s4 = s0 + s1
//   1 SUB   s5 = s0 - conj(s1)
//   2 MUL   s6 = s0 .* s1[2] (broadcast), lanes 0, 1 and 3 only
//   3 NOP
//   4 DOT   s7[1] = sum(s0 .* conj(s2))
//   5 RECIP s2 = 1/Re(s3)
//   6 ROT   s7[0] = s0[1] rotated by Re(s3[0]); also to phase memory
//   7 ROT   s7[2] = phase memory rotated by Re(s3[0]) again (chained)
//   8 ROT   s7[3] = s0[2] rotated hyperbolically by Re(s3[0])
//   9 HALT
// The testbench keeps its own model of every row, computed from the field
// definitions, and afterwards compares every element of every subchannel
// through the host read port (exactly, or within a tolerance for the
// rotations) and the phase memory, which must hold the last rotation. It checks the total cycle count and that
// each mechanism happened: stalls for multi-cycle units, reciprocal
// saturation, conjugation, broadcast, masked writes, NOP skipping, chained
// rotation and hyperbolic rotation.
module tb_mimo_accel_top;
  import mimo_pkg::*;
  localparam int NRX = 4, NSLOT = 8, NSC = 64, N_ITER = 11;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic host_imem_we = 0, host_dmem_we = 0;
  logic [5:0] host_imem_addr = 0, host_dmem_sc = 0, host_pmem_sc = 0;
  instr_t host_imem_wdata = '0;
  logic [2:0] host_dmem_slot = 0;
  logic [1:0] host_dmem_lane = 0;
  cplx_t host_dmem_wdata = '0, host_dmem_rdata, host_pmem_rdata;

  mimo_accel_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_stall = 0, n_sat = 0, n_conj = 0, n_bcast = 0, n_mask = 0, n_nop = 0, n_chain = 0, n_hyp = 0;
  cplx_t model [NSC][NSLOT][NRX];
  real rot0x [NSC], rot0y [NSC], rot2x [NSC], rot2y [NSC], hypx [NSC], hypy [NSC];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // stall: the controller waits while the started unit is still working
  logic waiting = 0;
  always @(posedge clk) begin
    if (waiting && !dut.core_done) n_stall++;
    if (dut.core_done) waiting <= 0;
    if (dut.core_start) waiting <= 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t mk(opcode_e op, int a, int b, int d, bit conj, bit bc,
                                int la, int lb, int dl, bit chain, logic [3:0] wm,
                                bit hyp = 1'b0);
    instr_t i;
    i = '0;
    i.op = op; i.src_a = 3'(a); i.src_b = 3'(b); i.dst = 3'(d);
    i.conj_b = conj; i.bcast_b = bc; i.lane_a = 2'(la); i.lane_b = 2'(lb);
    i.dst_lane = 2'(dl); i.rot_chain = chain; i.wmask = wm; i.hyp = hyp;
    return i;
  endfunction

  function automatic real_t rnd(int lim);   // uniform in [-lim, lim]
    return real_t'(int'($urandom_range(0, 2 * lim)) - lim);
  endfunction

  function automatic real_t recip_ref(real_t v);
    longint m;
    m = (v < 0) ? -longint'(v) : longint'(v);
    if (m <= 2048) return (v < 0) ? -16'sh7FFF : 16'sh7FFF;
    return (v < 0) ? 16'(-((longint'(1) << 26) / m)) : 16'((longint'(1) << 26) / m);
  endfunction

  task automatic rotate(real x, real y, real ang, output real ox, output real oy);
    ox = x * $cos(ang) - y * $sin(ang);
    oy = x * $sin(ang) + y * $cos(ang);
  endtask

  initial begin
    instr_t prog [10];
    int t0, expect_cycles;
    prog[0] = mk(OP_ADD,   0, 1, 4, 0, 0, 0, 0, 0, 0, 4'b1111);
    prog[1] = mk(OP_SUB,   0, 1, 5, 1, 0, 0, 0, 0, 0, 4'b1111);
    prog[2] = mk(OP_MUL,   0, 1, 6, 0, 1, 0, 2, 0, 0, 4'b1011);
    prog[3] = mk(OP_NOP,   0, 0, 0, 0, 0, 0, 0, 0, 0, 4'b0000);
    prog[4] = mk(OP_DOT,   0, 2, 7, 1, 0, 0, 0, 1, 0, 4'b0000);
    prog[5] = mk(OP_RECIP, 3, 0, 2, 0, 0, 0, 0, 0, 0, 4'b1111);
    prog[6] = mk(OP_ROT,   0, 3, 7, 0, 0, 1, 0, 0, 0, 4'b0000);
    prog[7] = mk(OP_ROT,   0, 3, 7, 0, 0, 0, 0, 2, 1, 4'b0000);
    prog[8] = mk(OP_ROT,   0, 3, 7, 0, 0, 2, 0, 3, 0, 4'b0000, 1'b1);
    prog[9] = mk(OP_HALT,  0, 0, 0, 0, 0, 0, 0, 0, 0, 4'b0000);

    // data: slots 0..3 random, |component| < 0.5 for s0..s2; s3 lane 0 an
    // angle in [-pi/4, pi/4]; s3 lane 1 tiny in even subchannels (saturates)
    for (int s = 0; s < NSC; s++)
      for (int v = 0; v < NSLOT; v++)
        for (int l = 0; l < NRX; l++) begin
          cplx_t c;
          if (v < 3) begin c.re = rnd(4095); c.im = rnd(4095); end
          else if (v == 3) begin
            c.im = rnd(4095);
            if (l == 0)               c.re = rnd(6433);
            else if (l == 1 && s % 2 == 0) c.re = rnd(1500);
            else                      c.re = real_t'($urandom_range(2100, 30000)) * ((s + l) % 3 == 0 ? -16'sd1 : 16'sd1);
          end
          else c = $urandom;
          model[s][v][l] = c;
        end

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      host_imem_we = 1; host_imem_addr = 6'(i); host_imem_wdata = prog[i];
    end
    for (int s = 0; s < NSC; s++)
      for (int v = 0; v < NSLOT; v++)
        for (int l = 0; l < NRX; l++) begin
          @(negedge clk);
          host_imem_we = 0;
          host_dmem_we = 1; host_dmem_sc = 6'(s); host_dmem_slot = 3'(v); host_dmem_lane = 2'(l);
          host_dmem_wdata = model[s][v][l];
        end
    @(negedge clk) host_dmem_we = 0;

    // reference model
    for (int s = 0; s < NSC; s++) begin
      cplx_t b;
      longint sr, si, pr, pi;
      real ang;
      for (int l = 0; l < NRX; l++) begin
        model[s][4][l].re = 16'(int'(model[s][0][l].re) + int'(model[s][1][l].re));
        model[s][4][l].im = 16'(int'(model[s][0][l].im) + int'(model[s][1][l].im));
        model[s][5][l].re = 16'(int'(model[s][0][l].re) - int'(model[s][1][l].re));
        model[s][5][l].im = 16'(int'(model[s][0][l].im) + int'(model[s][1][l].im));
        n_conj++;
        if (l != 2) begin
          b = model[s][1][2];
          pr = longint'(model[s][0][l].re) * b.re - longint'(model[s][0][l].im) * b.im;
          pi = longint'(model[s][0][l].re) * b.im + longint'(model[s][0][l].im) * b.re;
          model[s][6][l].re = 16'(pr >>> 13);
          model[s][6][l].im = 16'(pi >>> 13);
          n_bcast++;
        end else n_mask++;
      end
      sr = 0; si = 0;
      for (int l = 0; l < NRX; l++) begin
        b = model[s][2][l];
        pr = longint'(model[s][0][l].re) * b.re + longint'(model[s][0][l].im) * b.im;
        pi = -longint'(model[s][0][l].re) * b.im + longint'(model[s][0][l].im) * b.re;
        sr += pr; si += pi;
      end
      model[s][7][1].re = 16'(sr >>> 13);
      model[s][7][1].im = 16'(si >>> 13);
      for (int l = 0; l < NRX; l++) begin
        model[s][2][l].re = recip_ref(model[s][3][l].re);
        model[s][2][l].im = '0;
        if (model[s][3][l].re >= -2048 && model[s][3][l].re <= 2048) n_sat++;
      end
      ang = real'(model[s][3][0].re) / 8192.0;
      rotate(real'(model[s][0][1].re) / 8192.0, real'(model[s][0][1].im) / 8192.0, ang, rot0x[s], rot0y[s]);
      rotate(rot0x[s], rot0y[s], ang, rot2x[s], rot2y[s]);
      n_chain++;
      hypx[s] = (real'(model[s][0][2].re) * $cosh(ang) + real'(model[s][0][2].im) * $sinh(ang)) / 8192.0;
      hypy[s] = (real'(model[s][0][2].re) * $sinh(ang) + real'(model[s][0][2].im) * $cosh(ang)) / 8192.0;
      n_hyp++;
    end

    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) begin
      @(negedge clk);
      if (dut.u_ctrl.state == dut.u_ctrl.S_FETCH && dut.u_ctrl.pc == 6'd3) n_nop++;
    end
    expect_cycles = 1 + 2 * 10 + NSC * (4 * (3 + 2) + (3 + 18) + 3 * (3 + N_ITER + 2));
    checks++;
    if (cyc - t0 != expect_cycles) begin
      failures++;
      $display("cycles %0d expected %0d", cyc - t0, expect_cycles);
    end
    $display("program took %0d cycles", cyc - t0);

    // compare
    for (int s = 0; s < NSC; s++) begin
      for (int v = 0; v < NSLOT; v++)
        for (int l = 0; l < NRX; l++) begin
          host_dmem_sc = 6'(s); host_dmem_slot = 3'(v); host_dmem_lane = 2'(l);
          host_pmem_sc = 6'(s);
          #1;
          checks++;
          if (v == 7 && l != 1) begin
            real ex, ey, e;
            ex = (l == 0) ? rot0x[s] : (l == 2) ? rot2x[s] : hypx[s];
            ey = (l == 0) ? rot0y[s] : (l == 2) ? rot2y[s] : hypy[s];
            e = ((real'(host_dmem_rdata.re) / 8192.0 - ex) ** 2 + (real'(host_dmem_rdata.im) / 8192.0 - ey) ** 2) ** 0.5;
            if (e > 0.003) begin failures++; $display("sc %0d rot lane %0d error %f", s, l, e); end
            if (l == 3) begin
              checks++;
              if (host_pmem_rdata !== host_dmem_rdata) begin failures++; $display("phase memory sc %0d", s); end
            end
          end else if (host_dmem_rdata !== model[s][v][l]) begin
            failures++;
            $display("sc %0d slot %0d lane %0d: %h expected %h", s, v, l, host_dmem_rdata, model[s][v][l]);
          end
          #4;
        end
    end

    $display("mechanisms: stall=%0d recip_saturation=%0d conjugate=%0d broadcast=%0d masked_lane=%0d nop=%0d chained_rotation=%0d hyperbolic_rotation=%0d",
             n_stall, n_sat, n_conj, n_bcast, n_mask, n_nop, n_chain, n_hyp);
    checks += 8;
    if (n_hyp == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_conj == 0) failures++;
    if (n_bcast == 0) failures++;
    if (n_mask == 0) failures++;
    if (n_nop == 0) failures++;
    if (n_chain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
