// tb_recip_unit: self-checking test of the reciprocal unit.
// Applies edge values (0, +/-0.25, +/-1, +/-2, extremes) and random values,
// compares every lane with floor(2^26/|x|) carrying the sign of x, or the
// saturated value when |x| <= 0.25, and checks the 18-cycle latency.
module tb_recip_unit;
  import mimo_pkg::*;
  localparam int NRX = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, busy, out_valid;
  real_t [NRX-1:0] x, y;
  int checks = 0, failures = 0, cyc = 0;
  int sat_seen = 0;

  recip_unit #(.NRX(NRX)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real_t ref_recip(real_t v);
    longint m, q;
    m = (v < 0) ? -longint'(v) : longint'(v);
    if (m <= 2048) return (v < 0) ? -16'sh7FFF : 16'sh7FFF;
    q = (longint'(1) << 26) / m;
    return (v < 0) ? 16'(-q) : 16'(q);
  endfunction

  task automatic run(real_t [NRX-1:0] v);
    int t0;
    @(negedge clk);
    x = v; in_valid = 1;
    t0 = cyc;
    @(negedge clk);
    in_valid = 0;
    x = '0;
    while (!out_valid) @(negedge clk);
    checks++;
    if (cyc - t0 != 18) begin failures++; $display("latency %0d", cyc - t0); end
    for (int i = 0; i < NRX; i++) begin
      checks++;
      if (y[i] !== ref_recip(v[i])) begin
        failures++;
        $display("x=%0d y=%0d exp=%0d", v[i], y[i], ref_recip(v[i]));
      end
      if (v[i] >= -2048 && v[i] <= 2048) sat_seen++;
    end
  endtask

  initial begin
    real_t [NRX-1:0] v;
    x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    v = '{16'sd0, 16'sd2048, -16'sd2048, 16'sd2049}; run(v);
    v = '{16'sd8192, -16'sd8192, 16'sd16384, -16'sd32768}; run(v);
    v = '{16'sd32767, 16'sd1, -16'sd1, 16'sd3000}; run(v);
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < NRX; i++) v[i] = real_t'($urandom);
      run(v);
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
