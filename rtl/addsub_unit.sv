// addsub_unit: the addition unit of the processing core.
//
// Adds or subtracts two complex vectors of NRX elements, element by element.
// As drawn for this unit, both operands pass an input register, NRX +/- cells
// steered by one Add/Sub control work in parallel, and the result is
// registered again. Latency is two cycles from in_valid to out_valid; a new
// operand pair may enter every cycle.
//
// Interface: in_valid/sub/a/b are sampled together; y is valid while
// out_valid is high and holds until the next result. Overflow wraps around
// (two's complement), a choice of this design.
module addsub_unit
  import mimo_pkg::*;
#(
  parameter int NRX = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              sub,
  input  cplx_t [NRX-1:0]   a,
  input  cplx_t [NRX-1:0]   b,
  output logic              out_valid,
  output cplx_t [NRX-1:0]   y
);

  cplx_t [NRX-1:0] a_q, b_q;
  logic            sub_q, v_q;
  cplx_t [NRX-1:0] sum;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
      sub_q     <= 1'b0;
      a_q       <= '0;
      b_q       <= '0;
      y         <= '0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
      if (in_valid) begin
        a_q   <= a;
        b_q   <= b;
        sub_q <= sub;
      end
      if (v_q) y <= sum;
    end
  end

  always_comb begin
    for (int i = 0; i < NRX; i++) begin
      if (sub_q) begin
        sum[i].re = a_q[i].re - b_q[i].re;
        sum[i].im = a_q[i].im - b_q[i].im;
      end else begin
        sum[i].re = a_q[i].re + b_q[i].re;
        sum[i].im = a_q[i].im + b_q[i].im;
      end
    end
  end

endmodule
