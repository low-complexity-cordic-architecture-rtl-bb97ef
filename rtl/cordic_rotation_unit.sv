// cordic_rotation_unit: the rotation unit of the processing core, an
// iterative CORDIC in rotation mode with a table of shift amounts, for
// circular (trigonometric) and hyperbolic rotations.
//
// A vector (x0, y0) is rotated by the angle z0 through N_ITER shift-add
// micro-rotations. In iteration i, with d = +1 when the residual angle z is
// not negative and d = -1 otherwise (the sign bit of the Z register plays the
// role of the sign-bit register that steers both +/- cells),
//     circular:    X <- X - d * (Y >>> k(i))      Z <- Z - d * atan(2^-k(i))
//     hyperbolic:  X <- X + d * (Y >>> k(i))      Z <- Z - d * atanh(2^-k(i))
//     both:        Y <- Y + d * (X >>> k(i))
// The shift amounts k(i) come from a ROM indexed by the iteration. After the
// last iteration the vector is multiplied by the constant that undoes the
// gain of the micro-rotations, K = prod_i (1 + 2^-2k(i))^-1/2 (circular) or
// prod_i (1 - 2^-2k(i))^-1/2 (hyperbolic), so the result is the true
// rotation: (x cos z - y sin z, x sin z + y cos z), or
// (x cosh z + y sinh z, x sinh z + y cosh z). With (x0, y0) = (1, 0) this
// gives cos/sin or cosh/sinh of z0.
//
// Following the architecture: the table of k(i), the sign-steered
// add/subtract datapath and the scale-factor formula, and the target that any
// angle up to 45 degrees is reached within 0.037 degree. Design choices: no
// table is printed for it, and with d in {-1, +1} N iterations reach only
// 2^N distinct angles, so covering -45..+45 degrees to 0.037 degree needs at
// least 11; the circular table is k(i) = i + 1, i = 0..10 (worst-case
// residual atan(2^-11) = 0.028 degree). The hyperbolic table is the usual
// 1, 2, 3, 4, 4, 5, ... (k = 4 and 13 repeated, needed for convergence);
// with 11 iterations it covers |z0| <= 1.11 with a residual of at most
// 0.001. The atan/atanh tables hold round(f(2^-k) * 2^24), shifted to the
// internal precision; the scale constants are computed at elaboration for
// the chosen N_ITER. X, Y and Z carry GUARD extra fraction bits; X and Y
// carry two extra integer bits for the CORDIC gain.
//
// Interface: x0, y0 in Q3.13; z0 in Q3.13 radians, |z0| <= pi/4 circular
// (no quadrant correction), |z0| <= 1.11 hyperbolic. start loads the
// registers and samples hyp (ignored while busy); done is high for one cycle,
// N_ITER + 2 cycles after the start cycle (load, N_ITER iterations,
// scaling), with xn, yn (Q3.13, saturated), which hold until the next result.
module cordic_rotation_unit
  import mimo_pkg::*;
#(
  parameter int N_ITER = 11,
  parameter int GUARD  = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   hyp,
  input  real_t  x0,
  input  real_t  y0,
  input  real_t  z0,
  output logic   busy,
  output logic   done,
  output real_t  xn,
  output real_t  yn
);

  localparam int XW = DW + GUARD + 2;   // X/Y register width
  localparam int ZW = DW + GUARD;       // Z register width
  localparam int ZF = FRAC + GUARD;     // Z fraction bits
  localparam int CB = $clog2(N_ITER + 1);

  // round(atan(2^-k) * 2^24), k = 0..16
  localparam logic [31:0] ATAN24 [17] = '{
    32'h00C90FDB, 32'h0076B19C, 32'h003EB6EC, 32'h001FD5BB, 32'h000FFAAE,
    32'h0007FF55, 32'h0003FFEB, 32'h0001FFFD, 32'h00010000, 32'h00008000,
    32'h00004000, 32'h00002000, 32'h00001000, 32'h00000800, 32'h00000400,
    32'h00000200, 32'h00000100
  };

  // round(atanh(2^-k) * 2^24), k = 0..16 (entry 0 is never used)
  localparam logic [31:0] ATANH24 [17] = '{
    32'h00000000, 32'h008C9F54, 32'h004162BC, 32'h00202B12, 32'h00100559,
    32'h000800AB, 32'h00040015, 32'h00020003, 32'h00010000, 32'h00008000,
    32'h00004000, 32'h00002000, 32'h00001000, 32'h00000800, 32'h00000400,
    32'h00000200, 32'h00000100
  };

  // Shift-amount ROM: circular k(i) = i + 1; hyperbolic 1, 2, 3, 4, 4, 5, ...,
  // 13, 13, ... (4 and 13 repeated).
  function automatic int unsigned k_of(int unsigned i, bit h);
    if (!h) return i + 1;
    return i + 1 - ((i >= 4) ? 1 : 0) - ((i >= 14) ? 1 : 0);
  endfunction

  // Gain compensation in Q1.15: prod (1 +/- 2^-2k(i))^-1/2.
  function automatic int kscale(bit h);
    real p;
    p = 1.0;
    for (int i = 0; i < N_ITER; i++) begin
      if (h) p = p * $sqrt(1.0 - 2.0 ** (-2.0 * real'(k_of(i, h))));
      else   p = p * $sqrt(1.0 + 2.0 ** (-2.0 * real'(k_of(i, h))));
    end
    return $rtoi(32768.0 / p + 0.5);
  endfunction

  localparam int KW = 16;
  localparam logic signed [KW+1:0] KQ_C = (KW+2)'(kscale(1'b0));
  localparam logic signed [KW+1:0] KQ_H = (KW+2)'(kscale(1'b1));

  typedef logic signed [XW-1:0] xreg_t;
  typedef logic signed [ZW-1:0] zreg_t;

  xreg_t          x_q, y_q;
  zreg_t          z_q;
  logic [CB-1:0]  cnt;
  logic [4:0]     k;
  zreg_t          atan_k;
  xreg_t          x_sh, y_sh;
  logic           dneg;
  logic           hyp_q;

  // ROM read and shifters for the current iteration.
  always_comb begin
    k      = 5'(k_of(32'(cnt), hyp_q));
    atan_k = zreg_t'(((hyp_q ? ATANH24[k] : ATAN24[k]) + (32'd1 << (24 - ZF - 1))) >> (24 - ZF));
    x_sh   = x_q >>> k;
    y_sh   = y_q >>> k;
    dneg   = z_q[ZW-1];
  end

  // Scale by K, round, and saturate back to Q3.13.
  function automatic real_t scale_sat(xreg_t v, logic signed [KW+1:0] kq);
    logic signed [XW+KW+1:0] p;
    logic signed [XW+KW+1:0] r;
    p = (XW+KW+2)'(v) * (XW+KW+2)'(kq);
    r = (p + ((XW+KW+2)'(1) <<< (KW - 2 + GUARD))) >>> (KW - 1 + GUARD);
    if (r > (XW+KW+2)'(32767))       return real_t'(16'sh7FFF);
    else if (r < -(XW+KW+2)'(32768)) return real_t'(16'sh8000);
    else                             return real_t'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q  <= '0;
      y_q  <= '0;
      z_q  <= '0;
      hyp_q <= 1'b0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      xn   <= '0;
      yn   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          x_q  <= xreg_t'(x0) <<< GUARD;
          y_q  <= xreg_t'(y0) <<< GUARD;
          z_q  <= zreg_t'(z0) <<< GUARD;
          hyp_q <= hyp;
          cnt  <= '0;
          busy <= 1'b1;
        end
      end else if (cnt < CB'(N_ITER)) begin
        // circular: X -= d*Y', hyperbolic: X += d*Y'
        if (dneg ^ hyp_q) x_q <= x_q + y_sh;
        else              x_q <= x_q - y_sh;
        if (dneg) begin
          y_q <= y_q - x_sh;
          z_q <= z_q + atan_k;
        end else begin
          y_q <= y_q + x_sh;
          z_q <= z_q - atan_k;
        end
        cnt <= cnt + 1'b1;
      end else begin
        xn   <= scale_sat(x_q, hyp_q ? KQ_H : KQ_C);
        yn   <= scale_sat(y_q, hyp_q ? KQ_H : KQ_C);
        done <= 1'b1;
        busy <= 1'b0;
      end
    end
  end

endmodule
