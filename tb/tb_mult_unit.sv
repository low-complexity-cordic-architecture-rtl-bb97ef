// tb_mult_unit: self-checking test of the complex multiplication unit.
// Streams random operand pairs and checks, 2 cycles later, every element
// product (Q3.13, truncated) and the dot product, the sum of the exact
// products truncated once, computed here with 64-bit integers.
module tb_mult_unit;
  import mimo_pkg::*;
  localparam int NRX = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx_t [NRX-1:0] a, b, prod;
  cplx_t dot;
  int checks = 0, failures = 0, cyc = 0;
  cplx_t [NRX:0] expq [$];   // [NRX] holds the dot product
  int tq [$];

  mult_unit #(.NRX(NRX)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      cplx_t [NRX:0] e;
      int t;
      e = expq.pop_front();
      t = tq.pop_front();
      for (int i = 0; i < NRX; i++) begin
        checks++;
        if (prod[i] !== e[i]) begin failures++; $display("prod[%0d] %h exp %h", i, prod[i], e[i]); end
      end
      checks++;
      if (dot !== e[NRX]) begin failures++; $display("dot %h exp %h", dot, e[NRX]); end
      checks++;
      if (cyc - t != 2) begin failures++; $display("latency %0d", cyc - t); end
    end
  end

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < NRX; i++) begin
        a[i] = $urandom; b[i] = $urandom;
        if (n < 100) begin   // moderate values too, not only wrapping ones
          a[i].re = 16'($signed(a[i].re) >>> 2); a[i].im = 16'($signed(a[i].im) >>> 2);
          b[i].re = 16'($signed(b[i].re) >>> 2); b[i].im = 16'($signed(b[i].im) >>> 2);
        end
      end
      if (in_valid) begin
        cplx_t [NRX:0] e;
        longint sr, si, pr, pi;
        sr = 0; si = 0;
        for (int i = 0; i < NRX; i++) begin
          pr = longint'(a[i].re) * longint'(b[i].re) - longint'(a[i].im) * longint'(b[i].im);
          pi = longint'(a[i].re) * longint'(b[i].im) + longint'(a[i].im) * longint'(b[i].re);
          e[i].re = 16'(pr >>> 13);
          e[i].im = 16'(pi >>> 13);
          sr += pr; si += pi;
        end
        e[NRX].re = 16'(sr >>> 13);
        e[NRX].im = 16'(si >>> 13);
        expq.push_back(e);
        tq.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
