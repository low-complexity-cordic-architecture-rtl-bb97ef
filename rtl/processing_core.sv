// processing_core: the datapath of the accelerator, holding its four
// processing units.
//
//   addsub_unit           ADD / SUB   vector result
//   mult_unit             MUL         vector result (element products)
//                         DOT         scalar result (sum of the products)
//   recip_unit            RECIP       vector result 1/Re(A) (imaginary parts 0)
//   cordic_rotation_unit  ROT         scalar result, rot_in rotated by rot_angle
//                                     (hyperbolic rotation when rot_hyp is set)
//
// start is a one-cycle strobe with the opcode and operands; only the unit
// the opcode selects is started. done pulses when that unit's result is
// valid; vec_res and scal_res are then valid and hold until the next result.
// Latency from the start cycle to the done cycle: 2 cycles for ADD, SUB,
// MUL and DOT, 18 for RECIP and N_ITER + 2 for ROT. Only one operation is
// in flight at a time. The four units follow the architecture; the opcode
// set and the start/done handshake are this design's choices.
module processing_core
  import mimo_pkg::*;
#(
  parameter int NRX    = 4,
  parameter int N_ITER = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  opcode_e          op,
  input  cplx_t [NRX-1:0]  op_a,
  input  cplx_t [NRX-1:0]  op_b,
  input  cplx_t            rot_in,
  input  real_t            rot_angle,
  input  logic             rot_hyp,
  output logic             done,
  output cplx_t [NRX-1:0]  vec_res,
  output cplx_t            scal_res
);

  logic            as_v, mu_v, rc_v, ro_v;
  logic            as_done, mu_done, rc_done, ro_done, rc_busy, ro_busy;
  cplx_t [NRX-1:0] as_y, mu_prod;
  cplx_t           mu_dot;
  real_t [NRX-1:0] rc_x, rc_y;
  real_t           ro_x, ro_y;
  opcode_e         op_q;

  assign as_v = start && (op == OP_ADD || op == OP_SUB);
  assign mu_v = start && (op == OP_MUL || op == OP_DOT);
  assign rc_v = start && (op == OP_RECIP);
  assign ro_v = start && (op == OP_ROT);

  always_comb
    for (int i = 0; i < NRX; i++) rc_x[i] = op_a[i].re;

  addsub_unit #(.NRX(NRX)) u_addsub (
    .clk, .rst_n, .in_valid(as_v), .sub(op == OP_SUB), .a(op_a), .b(op_b),
    .out_valid(as_done), .y(as_y)
  );

  mult_unit #(.NRX(NRX)) u_mult (
    .clk, .rst_n, .in_valid(mu_v), .a(op_a), .b(op_b),
    .out_valid(mu_done), .prod(mu_prod), .dot(mu_dot)
  );

  recip_unit #(.NRX(NRX)) u_recip (
    .clk, .rst_n, .in_valid(rc_v), .x(rc_x),
    .busy(rc_busy), .out_valid(rc_done), .y(rc_y)
  );

  cordic_rotation_unit #(.N_ITER(N_ITER)) u_cordic (
    .clk, .rst_n, .start(ro_v), .hyp(rot_hyp), .x0(rot_in.re), .y0(rot_in.im), .z0(rot_angle),
    .busy(ro_busy), .done(ro_done), .xn(ro_x), .yn(ro_y)
  );

  // Remember which unit was started to steer its result out.
  always_ff @(posedge clk) begin
    if (!rst_n)     op_q <= OP_NOP;
    else if (start) op_q <= op;
  end

  assign done = as_done || mu_done || rc_done || ro_done;

  always_comb begin
    vec_res  = '0;
    scal_res = '0;
    unique case (op_q)
      OP_ADD, OP_SUB: vec_res = as_y;
      OP_MUL:         vec_res = mu_prod;
      OP_DOT:         scal_res = mu_dot;
      OP_RECIP:       for (int i = 0; i < NRX; i++) vec_res[i].re = rc_y[i];
      OP_ROT:         begin scal_res.re = ro_x; scal_res.im = ro_y; end
      default:        ;
    endcase
  end

  // A new operation must not start while a multi-cycle unit is still busy.
  always_ff @(posedge clk)
    if (rst_n) assert (!(start && (rc_busy || ro_busy)))
      else $error("processing_core: start while a unit is busy");

endmodule
