// tb_phase_memory: self-checking test of the rotation-result store.
// Random writes and reads on the controller port (one-cycle read latency)
// and combinational host reads, against a shadow copy.
module tb_phase_memory;
  import mimo_pkg::*;
  localparam int NSC = 64;
  logic clk = 0, wr_en = 0;
  logic [5:0] addr = 0, host_addr = 0;
  cplx_t wr_data = 0, rd_data, host_rdata;
  cplx_t shadow [NSC];
  int checks = 0, failures = 0;

  phase_memory #(.NSC(NSC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < NSC; a++) begin
      @(negedge clk);
      wr_en = 1; addr = 6'(a); wr_data = $urandom;
      shadow[a] = wr_data;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      addr = 6'($urandom); wr_en = $urandom_range(0, 1); wr_data = $urandom;
      host_addr = 6'($urandom);
      #1;
      checks++;
      if (host_rdata !== shadow[host_addr]) begin failures++; $display("host read"); end
      @(posedge clk); #1;
      checks++;
      if (rd_data !== shadow[addr]) begin failures++; $display("read %0d", addr); end
      if (wr_en) shadow[addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
