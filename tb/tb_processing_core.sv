// tb_processing_core: self-checking test of the four-unit datapath.
// Issues every operation with random operands, one at a time, and checks the
// routed result against independent integer / real-number references and the
// start-to-done latency of each unit (2, 2, 2, 2, 18, N_ITER + 2).
module tb_processing_core;
  import mimo_pkg::*;
  localparam int NRX = 4, N_ITER = 11;
  logic clk = 0, rst_n = 0, start = 0, done;
  opcode_e op = OP_NOP;
  cplx_t [NRX-1:0] op_a, op_b, vec_res;
  cplx_t rot_in, scal_res;
  real_t rot_angle;
  logic rot_hyp = 0;
  int n_hyp = 0;
  int checks = 0, failures = 0, cyc = 0;
  int count [16];

  processing_core #(.NRX(NRX), .N_ITER(N_ITER)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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

  task automatic issue(opcode_e o);
    int t0;
    cplx_t [NRX-1:0] ev;
    cplx_t es;
    longint sr, si, pr, pi, m;
    real ang, ex, ey, e;
    @(negedge clk);
    for (int i = 0; i < NRX; i++) begin
      op_a[i] = $urandom; op_b[i] = $urandom;
      op_a[i].re = 16'($signed(op_a[i].re) >>> 2); op_a[i].im = 16'($signed(op_a[i].im) >>> 2);
      op_b[i].re = 16'($signed(op_b[i].re) >>> 2); op_b[i].im = 16'($signed(op_b[i].im) >>> 2);
    end
    rot_in = op_a[0];
    rot_hyp = $urandom_range(0, 1);
    if (rot_hyp) rot_angle = real_t'($urandom_range(0, 18000)) - 16'sd9000;   // within +/- 1.1
    else         rot_angle = real_t'($urandom_range(0, 12866)) - 16'sd6433;   // within +/- pi/4
    op = o; start = 1; t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    count[o]++;
    checks++;
    if (cyc - t0 != latency(o)) begin failures++; $display("op %0d latency %0d", o, cyc - t0); end
    ev = '0; es = '0; sr = 0; si = 0;
    for (int i = 0; i < NRX; i++) begin
      case (o)
        OP_ADD: begin ev[i].re = 16'(int'(op_a[i].re) + int'(op_b[i].re)); ev[i].im = 16'(int'(op_a[i].im) + int'(op_b[i].im)); end
        OP_SUB: begin ev[i].re = 16'(int'(op_a[i].re) - int'(op_b[i].re)); ev[i].im = 16'(int'(op_a[i].im) - int'(op_b[i].im)); end
        OP_MUL, OP_DOT: begin
          pr = longint'(op_a[i].re) * op_b[i].re - longint'(op_a[i].im) * op_b[i].im;
          pi = longint'(op_a[i].re) * op_b[i].im + longint'(op_a[i].im) * op_b[i].re;
          sr += pr; si += pi;
          if (o == OP_MUL) begin ev[i].re = 16'(pr >>> 13); ev[i].im = 16'(pi >>> 13); end
        end
        OP_RECIP: begin
          m = op_a[i].re < 0 ? -longint'(op_a[i].re) : longint'(op_a[i].re);
          if (m <= 2048) ev[i].re = op_a[i].re < 0 ? -16'sh7FFF : 16'sh7FFF;
          else ev[i].re = op_a[i].re < 0 ? 16'(-((longint'(1) << 26) / m)) : 16'((longint'(1) << 26) / m);
        end
        default: ;
      endcase
    end
    if (o == OP_DOT) begin es.re = 16'(sr >>> 13); es.im = 16'(si >>> 13); end
    if (o == OP_ROT) begin
      ang = real'(rot_angle) / 8192.0;
      if (rot_hyp) begin
        ex = (real'(rot_in.re) * $cosh(ang) + real'(rot_in.im) * $sinh(ang)) / 8192.0;
        ey = (real'(rot_in.re) * $sinh(ang) + real'(rot_in.im) * $cosh(ang)) / 8192.0;
        n_hyp++;
      end else begin
        ex = (real'(rot_in.re) * $cos(ang) - real'(rot_in.im) * $sin(ang)) / 8192.0;
        ey = (real'(rot_in.re) * $sin(ang) + real'(rot_in.im) * $cos(ang)) / 8192.0;
      end
      e = ((real'(scal_res.re) / 8192.0 - ex) ** 2 + (real'(scal_res.im) / 8192.0 - ey) ** 2) ** 0.5;
      checks++;
      if (e > 0.0025) begin failures++; $display("rot error %f", e); end
    end else begin
      checks += 2;
      if (vec_res !== ev) begin failures++; $display("op %0d vec %h exp %h", o, vec_res, ev); end
      if (scal_res !== es) begin failures++; $display("op %0d scal %h exp %h", o, scal_res, es); end
    end
  endtask

  initial begin
    op_a = '0; op_b = '0; rot_in = '0; rot_angle = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      issue(OP_ADD); issue(OP_SUB); issue(OP_MUL); issue(OP_DOT); issue(OP_RECIP); issue(OP_ROT);
    end
    checks++;
    if (n_hyp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
