// mult_unit: the multiplication unit of the processing core.
//
// NRX complex multipliers work in parallel, one per vector element. Each is
// built from four real multipliers (ar*br, ai*bi, ar*bi, ai*br) and an adder
// stage that forms re = ar*br - ai*bi and im = ar*bi + ai*br. The NRX
// products are output as a vector, and their sum, the dot product of the two
// operands, as a single complex number. Conjugation needed for a Hermitian
// product is applied to operand B before it reaches this unit.
//
// Products are rescaled to Q3.13 by an arithmetic shift of 13 bits
// (truncation) after the sum is formed, so the dot product is rounded once.
// Overflow wraps around. The structure (NRX complex multipliers of four real
// multipliers and an adder, registered operands) follows the architecture;
// providing both the product vector and the sum, and the rounding, are this
// design's choices. Latency: two cycles (input register, then the
// multiply-add and the output register); one operand pair per cycle.
module mult_unit
  import mimo_pkg::*;
#(
  parameter int NRX = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  cplx_t [NRX-1:0]   a,
  input  cplx_t [NRX-1:0]   b,
  output logic              out_valid,
  output cplx_t [NRX-1:0]   prod,
  output cplx_t             dot
);

  localparam int PW = 2*DW + 1;            // one complex product component
  localparam int SW = PW + $clog2(NRX + 1); // sum of NRX of them

  cplx_t [NRX-1:0]       a_q, b_q;
  logic                  v_q;
  logic signed [PW-1:0]  pre [NRX];
  logic signed [PW-1:0]  pim [NRX];
  logic signed [SW-1:0]  sre, sim;
  logic signed [PW-1:0]  ar, ai, br, bi;
  cplx_t [NRX-1:0]       prod_d;

  always_comb begin
    sre = '0;
    sim = '0;
    for (int i = 0; i < NRX; i++) begin
      ar = PW'(a_q[i].re);
      ai = PW'(a_q[i].im);
      br = PW'(b_q[i].re);
      bi = PW'(b_q[i].im);
      pre[i] = ar * br - ai * bi;
      pim[i] = ar * bi + ai * br;
      prod_d[i].re = real_t'(pre[i] >>> FRAC);
      prod_d[i].im = real_t'(pim[i] >>> FRAC);
      sre = sre + SW'(pre[i]);
      sim = sim + SW'(pim[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
      a_q       <= '0;
      b_q       <= '0;
      prod      <= '0;
      dot       <= '0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
      if (in_valid) begin
        a_q <= a;
        b_q <= b;
      end
      if (v_q) begin
        prod   <= prod_d;
        dot.re <= real_t'(sre >>> FRAC);
        dot.im <= real_t'(sim >>> FRAC);
      end
    end
  end

endmodule
