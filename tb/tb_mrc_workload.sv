// tb_mrc_workload: a small MIMO decoding task run on the accelerator at its
// default size: maximum-ratio combining of one QPSK stream received on four
// antennas, in all 64 subchannels.
//
// Per subchannel the host loads the channel vector h (slot 0) and the
// received vector y = h * s (slot 1), with s a QPSK symbol (+/-0.5 +/-0.5j)
// and h random with components in [-0.5, 0.5], drawn again while
// |h|^2 < 0.3: 1/|h|^2 must stay inside the Q3.13 range of the reciprocal
// unit, which saturates for |h|^2 <= 0.25. The program is
//   0 DOT   s2[0] = sum(y .* conj(h))          h^H y
//   1 DOT   s2[1] = sum(h .* conj(h))          |h|^2
//   2 RECIP s3    = 1/Re(s2)                   lane 1 holds 1/|h|^2
//   3 MUL   s4[0] = s2[0] * s3[1] (broadcast)  the equalised symbol
//   4 HALT
// The testbench checks the equalised symbol against the transmitted one
// (within 0.02, fixed-point rounding) and that the QPSK decision is right,
// and checks the cycle count of the program.
module tb_mrc_workload;
  import mimo_pkg::*;
  localparam int NRX = 4, NSC = 64;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic host_imem_we = 0, host_dmem_we = 0;
  logic [5:0] host_imem_addr = 0, host_dmem_sc = 0, host_pmem_sc = 0;
  instr_t host_imem_wdata = '0;
  logic [2:0] host_dmem_slot = 0;
  logic [1:0] host_dmem_lane = 0;
  cplx_t host_dmem_wdata = '0, host_dmem_rdata, host_pmem_rdata;

  mimo_accel_top dut (.*);

  int checks = 0, failures = 0, cyc = 0, correct = 0;
  real sre [NSC], sim [NSC];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int s, int v, int l, cplx_t c);
    @(negedge clk);
    host_dmem_we = 1; host_dmem_sc = 6'(s); host_dmem_slot = 3'(v); host_dmem_lane = 2'(l);
    host_dmem_wdata = c;
  endtask

  initial begin
    instr_t prog [5];
    int t0, expect_cycles;
    foreach (prog[i]) prog[i] = '0;
    prog[0].op = OP_DOT;   prog[0].src_a = 3'd1; prog[0].src_b = 3'd0; prog[0].conj_b = 1'b1;
                           prog[0].dst = 3'd2; prog[0].dst_lane = 2'd0;
    prog[1].op = OP_DOT;   prog[1].src_a = 3'd0; prog[1].src_b = 3'd0; prog[1].conj_b = 1'b1;
                           prog[1].dst = 3'd2; prog[1].dst_lane = 2'd1;
    prog[2].op = OP_RECIP; prog[2].src_a = 3'd2; prog[2].dst = 3'd3; prog[2].wmask = 4'b0010;
    prog[3].op = OP_MUL;   prog[3].src_a = 3'd2; prog[3].src_b = 3'd3; prog[3].bcast_b = 1'b1;
                           prog[3].lane_b = 2'd1; prog[3].dst = 3'd4; prog[3].wmask = 4'b0001;
    prog[4].op = OP_HALT;

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      host_imem_we = 1; host_imem_addr = 6'(i); host_imem_wdata = prog[i];
    end
    @(negedge clk) host_imem_we = 0;

    for (int s = 0; s < NSC; s++) begin
      cplx_t hv [NRX];
      real p;
      sre[s] = ($urandom_range(0, 1) != 0) ? 0.5 : -0.5;
      sim[s] = ($urandom_range(0, 1) != 0) ? 0.5 : -0.5;
      do begin
        p = 0.0;
        for (int l = 0; l < NRX; l++) begin
          hv[l].re = real_t'(int'($urandom_range(0, 8192)) - 4096);
          hv[l].im = real_t'(int'($urandom_range(0, 8192)) - 4096);
          p += (real'(hv[l].re) ** 2 + real'(hv[l].im) ** 2) / (8192.0 * 8192.0);
        end
      end while (p < 0.3);
      for (int l = 0; l < NRX; l++) begin
        cplx_t h, y;
        real hr, hi;
        h = hv[l];
        hr = real'(h.re) / 8192.0; hi = real'(h.im) / 8192.0;
        y.re = real_t'($rtoi((hr * sre[s] - hi * sim[s]) * 8192.0));
        y.im = real_t'($rtoi((hr * sim[s] + hi * sre[s]) * 8192.0));
        put(s, 0, l, h);
        put(s, 1, l, y);
      end
    end
    @(negedge clk) host_dmem_we = 0;

    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    expect_cycles = 1 + 2 * 5 + NSC * (3 * (3 + 2) + (3 + 18));
    checks++;
    if (cyc - t0 != expect_cycles) begin failures++; $display("cycles %0d expected %0d", cyc - t0, expect_cycles); end

    for (int s = 0; s < NSC; s++) begin
      real xr, xi;
      host_dmem_sc = 6'(s); host_dmem_slot = 3'd4; host_dmem_lane = 2'd0;
      #1;
      xr = real'(host_dmem_rdata.re) / 8192.0;
      xi = real'(host_dmem_rdata.im) / 8192.0;
      checks += 2;
      if ((xr - sre[s]) ** 2 + (xi - sim[s]) ** 2 > 0.02 ** 2) begin
        failures++;
        $display("sc %0d: equalised (%f,%f) sent (%f,%f)", s, xr, xi, sre[s], sim[s]);
      end
      if (((xr > 0) == (sre[s] > 0)) && ((xi > 0) == (sim[s] > 0))) correct++;
      else failures++;
      #4;
    end
    $display("MRC: %0d of %0d QPSK symbols decided correctly, %0d cycles", correct, NSC, cyc - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
