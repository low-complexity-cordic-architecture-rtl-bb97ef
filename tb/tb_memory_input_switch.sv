// tb_memory_input_switch: self-checking test of the result placement.
// Random rows, results and instructions; the expected row is the input row
// with the destination slot's masked lanes (vector results) or one lane
// (DOT and ROT) replaced, every other element unchanged.
module tb_memory_input_switch;
  import mimo_pkg::*;
  localparam int NRX = 4, NSLOT = 8;
  cplx_t [NSLOT-1:0][NRX-1:0] row, row_out, exp_row;
  instr_t instr;
  cplx_t [NRX-1:0] vec_res;
  cplx_t scal_res;
  int checks = 0, failures = 0;
  opcode_e ops [7] = '{OP_ADD, OP_SUB, OP_MUL, OP_DOT, OP_RECIP, OP_ROT, OP_NOP};

  memory_input_switch #(.NRX(NRX), .NSLOT(NSLOT)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int v = 0; v < NSLOT; v++) for (int l = 0; l < NRX; l++) row[v][l] = $urandom;
      for (int l = 0; l < NRX; l++) vec_res[l] = $urandom;
      scal_res = $urandom;
      instr = instr_t'($urandom);
      instr.op = ops[$urandom_range(0, 5)];
      #1;
      exp_row = row;
      if (instr.op == OP_DOT || instr.op == OP_ROT)
        exp_row[instr.dst][instr.dst_lane] = scal_res;
      else
        for (int l = 0; l < NRX; l++) if (instr.wmask[l]) exp_row[instr.dst][l] = vec_res[l];
      checks++;
      if (row_out !== exp_row) begin failures++; $display("row mismatch op %0d", instr.op); end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
