// Testbench for hash_function_table: checks the skewed round-robin reset
// content (entry e sends warp j of its group to sub-core (j+e) mod 4, select
// line 0 in bits [7:4], line 1 in bits [3:0]), then random writes and reads
// through the 4:1 read multiplexer.
`include "tb_check.svh"
module tb_hash_function_table;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [1:0] wr_idx = 0, rd_idx = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic [7:0] model [4];
  always #5 clk = ~clk;
  hash_function_table #(.ENTRIES(4)) dut (.clk, .rst_n, .wr_en, .wr_idx, .wr_data, .rd_idx, .rd_data);
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    @(posedge clk); @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int e = 0; e < 4; e++) begin
      rd_idx <= 2'(e); #1;
      for (int j = 0; j < 4; j++) begin
        int sc;
        sc = {31'(rd_data[j]), rd_data[4+j]};
        sc = {30'd0, rd_data[j], rd_data[4+j]};
        `CHECK(sc == (j + e) % 4, $sformatf("SRR entry %0d warp %0d -> %0d", e, j, sc))
      end
      @(posedge clk);
    end
    for (int e = 0; e < 4; e++) begin
      rd_idx <= 2'(e); #1; model[e] = rd_data; @(posedge clk);
    end
    for (int i = 0; i < 100; i++) begin
      wr_en <= $urandom % 2; wr_idx <= 2'($urandom); wr_data <= 8'($urandom);
      rd_idx <= 2'($urandom);
      @(posedge clk);
      if (wr_en) model[wr_idx] = wr_data;
      #1;
      `CHECK(rd_data == model[rd_idx], $sformatf("read %0d", rd_idx))
    end
    `TB_FINISH
  end
endmodule
