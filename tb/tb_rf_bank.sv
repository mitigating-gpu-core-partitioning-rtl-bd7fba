// Testbench for rf_bank at its default size (256 rows x 1024 bits): random
// writes and reads against a software copy, checking the one-cycle read
// latency and read-before-write on a same-row collision.
`include "tb_check.svh"
module tb_rf_bank;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [7:0] rd_addr = 0, wr_addr = 0;
  vreg_t rd_data, wr_data = '0;
  vreg_t model [256];
  logic [255:0] written = '0;
  always #5 clk = ~clk;
  rf_bank dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);
  function automatic vreg_t rnd();
    vreg_t v;
    for (int i = 0; i < 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    // fill every row
    for (int r = 0; r < 256; r++) begin
      wr_en <= 1; wr_addr <= 8'(r); wr_data <= rnd();
      @(posedge clk);
      model[r] = wr_data; written[r] = 1;
    end
    wr_en <= 0;
    for (int it = 0; it < 2000; it++) begin
      logic [7:0] ra; vreg_t exp;
      ra = 8'($urandom);
      rd_en <= 1; rd_addr <= ra;
      wr_en <= $urandom % 2; wr_addr <= ($urandom % 4 == 0) ? ra : 8'($urandom); wr_data <= rnd();
      @(posedge clk);
      exp = model[ra];
      if (wr_en) model[wr_addr] = wr_data;
      rd_en <= 0; wr_en <= 0;
      #1;
      `CHECK(rd_data == exp, $sformatf("row %0d", ra))
      @(posedge clk);
    end
    `TB_FINISH
  end
endmodule
