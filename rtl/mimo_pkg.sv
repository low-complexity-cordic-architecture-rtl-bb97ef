// mimo_pkg: types and constants shared by the MIMO decoding accelerator.
//
// Number format (this design's choice; no word width is fixed by the
// architecture): every real quantity is a 16-bit two's-complement number
// with 13 fraction bits (Q3.13, range [-4, 4)). A complex number is a packed
// {re, im} pair, and a vector operand is NRX complex numbers, one per
// receive antenna.
//
// The instruction word is this design's own encoding of the controls the
// architecture gives to the program: the operation, the operand selection and
// arrangement done by the core-input switch, and the result placement done by
// the memory-input switch.
package mimo_pkg;

  localparam int DW   = 16;  // bits per real component
  localparam int FRAC = 13;  // fraction bits

  typedef logic signed [DW-1:0] real_t;

  typedef struct packed {
    real_t re;
    real_t im;
  } cplx_t;

  localparam int CW = $bits(cplx_t);

  // Operations of the processing core.
  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,  // skip
    OP_ADD   = 4'd1,  // vector A + B           (addition unit)
    OP_SUB   = 4'd2,  // vector A - B           (addition unit)
    OP_MUL   = 4'd3,  // element products A.*B  (multiplication unit)
    OP_DOT   = 4'd4,  // scalar sum(A.*B)       (multiplication unit)
    OP_RECIP = 4'd5,  // 1/Re(A) per lane       (reciprocal unit)
    OP_ROT   = 4'd6,  // rotate one vector      (rotation unit, circular or hyperbolic)
    OP_HALT  = 4'd15  // end of program
  } opcode_e;

  // 32-bit instruction word. Lane fields are 2 bits wide, enough for up to
  // four receive antennas; slot fields address up to eight vectors per row.
  typedef struct packed {
    opcode_e    op;         // [31:28]
    logic [2:0] src_a;      // [27:25] slot of operand A
    logic [2:0] src_b;      // [24:22] slot of operand B
    logic [2:0] dst;        // [21:19] slot receiving the result
    logic       conj_b;     // [18]    conjugate operand B
    logic       bcast_b;    // [17]    broadcast lane lane_b of B to all lanes
    logic [1:0] lane_a;     // [16:15] lane of A rotated by OP_ROT
    logic [1:0] lane_b;     // [14:13] lane of B broadcast / used as ROT angle
    logic [1:0] dst_lane;   // [12:11] lane receiving a scalar result
    logic       rot_chain;  // [10]    OP_ROT takes its vector from phase memory
    logic [3:0] wmask;      // [9:6]   lanes written by a vector result
    logic       hyp;        // [5]     OP_ROT is a hyperbolic rotation
    logic [4:0] rsvd;       // [4:0]   unused, write zero
  } instr_t;

  localparam int IW = $bits(instr_t);

endpackage
