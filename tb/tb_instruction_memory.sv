// tb_instruction_memory: self-checking test of the program store.
// Writes random words to every address and reads them back with the
// one-cycle read latency, in random order.
module tb_instruction_memory;
  import mimo_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, wr_en = 0;
  logic [5:0] rd_addr = 0, wr_addr = 0;
  instr_t rd_data, wr_data = '0;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  instruction_memory #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(a); wr_data = instr_t'($urandom);
      shadow[a] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk) rd_addr = 6'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rd_data !== shadow[rd_addr]) begin failures++; $display("addr %0d", rd_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
