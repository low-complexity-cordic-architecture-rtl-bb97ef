// tb_core_input_switch: self-checking test of the operand multiplexer.
// Random rows and instruction fields; expected operands are formed here
// element by element from the field definitions (slot select, broadcast,
// conjugate, rotation vector from a lane or from phase memory, angle).
module tb_core_input_switch;
  import mimo_pkg::*;
  localparam int NRX = 4, NSLOT = 8;
  cplx_t [NSLOT-1:0][NRX-1:0] row;
  instr_t instr;
  cplx_t pmem_data, rot_in;
  cplx_t [NRX-1:0] op_a, op_b;
  real_t rot_angle;
  int checks = 0, failures = 0;
  int conj_seen = 0, bcast_seen = 0, chain_seen = 0;

  core_input_switch #(.NRX(NRX), .NSLOT(NSLOT)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int v = 0; v < NSLOT; v++) for (int l = 0; l < NRX; l++) row[v][l] = $urandom;
      instr = instr_t'($urandom);
      pmem_data = $urandom;
      #1;
      conj_seen += int'(instr.conj_b); bcast_seen += int'(instr.bcast_b); chain_seen += int'(instr.rot_chain);
      for (int l = 0; l < NRX; l++) begin
        cplx_t eb;
        eb = instr.bcast_b ? row[instr.src_b][instr.lane_b] : row[instr.src_b][l];
        if (instr.conj_b) eb.im = 16'(-int'(eb.im));
        checks += 2;
        if (op_a[l] !== row[instr.src_a][l]) begin failures++; $display("op_a"); end
        if (op_b[l] !== eb) begin failures++; $display("op_b"); end
      end
      checks += 2;
      if (rot_in !== (instr.rot_chain ? pmem_data : row[instr.src_a][instr.lane_a])) begin failures++; $display("rot_in"); end
      if (rot_angle !== row[instr.src_b][instr.lane_b].re) begin failures++; $display("angle"); end
      #9;
    end
    checks++;
    if (conj_seen == 0 || bcast_seen == 0 || chain_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
