// tb_data_memory: self-checking test of the subchannel data memory.
// Fills every element through the host port against a shadow copy, checks
// the combinational host read, the one-cycle row read, whole-row writes, and
// that a core write wins over a host write to the same row.
module tb_data_memory;
  import mimo_pkg::*;
  localparam int NRX = 4, NSLOT = 8, NSC = 64;
  logic clk = 0, rd_en = 0, wr_en = 0, host_we = 0;
  logic [5:0] rd_addr = 0, wr_addr = 0, host_sc = 0;
  logic [2:0] host_slot = 0;
  logic [1:0] host_lane = 0;
  cplx_t host_wdata = 0, host_rdata;
  cplx_t [NSLOT-1:0][NRX-1:0] rd_row, wr_row = '0;
  cplx_t [NSLOT-1:0][NRX-1:0] shadow [NSC];
  int checks = 0, failures = 0;

  data_memory #(.NRX(NRX), .NSLOT(NSLOT), .NSC(NSC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // host fills everything
    for (int s = 0; s < NSC; s++)
      for (int v = 0; v < NSLOT; v++)
        for (int l = 0; l < NRX; l++) begin
          @(negedge clk);
          host_we = 1; host_sc = 6'(s); host_slot = 3'(v); host_lane = 2'(l);
          host_wdata = $urandom;
          shadow[s][v][l] = host_wdata;
        end
    @(negedge clk) host_we = 0;
    // host reads
    for (int n = 0; n < 300; n++) begin
      host_sc = 6'($urandom); host_slot = 3'($urandom); host_lane = 2'($urandom);
      #1;
      checks++;
      if (host_rdata !== shadow[host_sc][host_slot][host_lane]) begin failures++; $display("host read"); end
    end
    // row reads and writes
    for (int n = 0; n < 300; n++) begin
      int r, w;
      @(negedge clk);
      r = $urandom_range(0, NSC - 1); w = $urandom_range(0, NSC - 1);
      rd_en = 1; rd_addr = 6'(r);
      wr_en = $urandom_range(0, 1); wr_addr = 6'(w);
      for (int v = 0; v < NSLOT; v++) for (int l = 0; l < NRX; l++) wr_row[v][l] = $urandom;
      @(posedge clk); #1;
      checks++;
      if (rd_row !== shadow[r]) begin failures++; $display("row read %0d", r); end
      if (wr_en) shadow[w] = wr_row;
    end
    // collision: core and host write the same row
    @(negedge clk);
    rd_en = 0; wr_en = 1; wr_addr = 6'd5; host_we = 1; host_sc = 6'd5; host_slot = 0; host_lane = 0;
    host_wdata = 32'h1234_5678;
    for (int v = 0; v < NSLOT; v++) for (int l = 0; l < NRX; l++) wr_row[v][l] = 32'(v * 16 + l);
    @(negedge clk);
    wr_en = 0; host_we = 0;
    #1;
    checks++;
    if (host_rdata !== 32'(0)) begin failures++; $display("collision priority"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
