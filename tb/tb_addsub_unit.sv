// tb_addsub_unit: self-checking test of the vector add/subtract unit.
// Streams 300 random operand pairs (one per cycle, random Add/Sub, random
// gaps) and compares every result, 2 cycles later, with element-wise sums
// or differences wrapped to 16 bits. Also checks the 2-cycle latency.
module tb_addsub_unit;
  import mimo_pkg::*;
  localparam int NRX = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, sub = 0, out_valid;
  cplx_t [NRX-1:0] a, b, y;
  int checks = 0, failures = 0;
  cplx_t [NRX-1:0] expq [$];
  int tq [$];
  int cyc = 0;

  addsub_unit #(.NRX(NRX)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      cplx_t [NRX-1:0] e;
      int t;
      e = expq.pop_front();
      t = tq.pop_front();
      checks++;
      if (y !== e) begin
        failures++;
        $display("mismatch y=%h exp=%h", y, e);
      end
      checks++;
      if (cyc - t != 2) begin
        failures++;
        $display("latency %0d", cyc - t);
      end
    end
  end

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      sub = $urandom_range(0, 1);
      for (int i = 0; i < NRX; i++) begin
        a[i] = $urandom; b[i] = $urandom;
      end
      if (in_valid) begin
        cplx_t [NRX-1:0] e;
        for (int i = 0; i < NRX; i++) begin
          e[i].re = sub ? 16'(int'(a[i].re) - int'(b[i].re)) : 16'(int'(a[i].re) + int'(b[i].re));
          e[i].im = sub ? 16'(int'(a[i].im) - int'(b[i].im)) : 16'(int'(a[i].im) + int'(b[i].im));
        end
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
