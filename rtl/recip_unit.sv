// recip_unit: the reciprocal unit of the processing core.
//
// Computes y = 1/x for NRX real numbers in parallel, mainly to scale signal
// power. The architecture fixes the function and the lane structure (NRX
// independent 1/X cells between an NRX-wide input and output); how a 1/X
// cell works is this design's choice: the simplest sequential hardware, a
// radix-2 restoring divider per lane that forms floor(2^26 / |x|), which is
// 1/x in Q3.13, one quotient bit per cycle, followed by the sign of x.
//
// Results that do not fit Q3.13, i.e. |x| <= 0.25 including x = 0, saturate
// to +/-(4 - 2^-13) (+ for x = 0).
//
// Timing: in_valid loads the operands (ignored while busy); the quotient
// takes 16 cycles; out_valid is high for one cycle, 18 cycles after the
// cycle in which in_valid was high, with y. y holds until the next result.
module recip_unit
  import mimo_pkg::*;
#(
  parameter int NRX = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  real_t [NRX-1:0]   x,
  output logic              busy,
  output logic              out_valid,
  output real_t [NRX-1:0]   y
);

  localparam int QB = DW;          // quotient bits produced
  localparam int ONE_SQ = 2*FRAC;  // 1.0 * 1.0 in the dividend: 2^26
  // The dividend 2^26 shifted down by QB bits seeds the remainder.
  localparam logic [DW:0] REM0 = (DW+1)'(1 << (ONE_SQ - QB));
  // |x| at or below this quotient overflows Q3.13.
  localparam logic [DW-1:0] DMIN = DW'(1 << (ONE_SQ - DW + 1));
  localparam real_t SAT = real_t'({1'b0, {(DW-1){1'b1}}});

  logic [DW-1:0]   d   [NRX];   // |x|
  logic            neg [NRX];
  logic            sat [NRX];
  logic [DW:0]     rem [NRX];
  logic [QB-1:0]   q   [NRX];
  logic [$clog2(QB+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      cnt       <= '0;
      y         <= '0;
      for (int i = 0; i < NRX; i++) begin
        d[i] <= '0; neg[i] <= 1'b0; sat[i] <= 1'b0; rem[i] <= '0; q[i] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          busy <= 1'b1;
          cnt  <= '0;
          for (int i = 0; i < NRX; i++) begin
            neg[i] <= x[i][DW-1];
            d[i]   <= x[i][DW-1] ? DW'(-x[i]) : DW'(x[i]);
            sat[i] <= (x[i][DW-1] ? DW'(-x[i]) : DW'(x[i])) <= DMIN;
            rem[i] <= REM0;
            q[i]   <= '0;
          end
        end
      end else if (cnt < ($clog2(QB+1))'(QB)) begin
        cnt <= cnt + 1'b1;
        for (int i = 0; i < NRX; i++) begin
          // Shift in a zero dividend bit, subtract if it fits.
          if ({rem[i][DW-1:0], 1'b0} >= {1'b0, d[i]}) begin
            rem[i] <= {rem[i][DW-1:0], 1'b0} - {1'b0, d[i]};
            q[i]   <= {q[i][QB-2:0], 1'b1};
          end else begin
            rem[i] <= {rem[i][DW-1:0], 1'b0};
            q[i]   <= {q[i][QB-2:0], 1'b0};
          end
        end
      end else begin
        busy      <= 1'b0;
        out_valid <= 1'b1;
        for (int i = 0; i < NRX; i++) begin
          if (sat[i])      y[i] <= neg[i] ? -SAT : SAT;
          else if (neg[i]) y[i] <= -real_t'(q[i]);
          else             y[i] <= real_t'(q[i]);
        end
      end
    end
  end

endmodule
