// Testbench for cu_dispatch with two collector units: random ready CUs and
// random execution-unit backpressure. Checks the chosen CU carries its own
// instruction, an ack only on acceptance, and round-robin alternation when
// both CUs stay ready.
`include "tb_check.svh"
module tb_cu_dispatch;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] cu_valid = '0, cu_ack;
  dispatch_t [1:0] cu_data;
  logic ex_valid, ex_ready = 0;
  dispatch_t ex;
  int last = 1;
  always #5 clk = ~clk;
  cu_dispatch #(.NCU(2)) dut (.clk, .rst_n, .cu_valid, .cu_data, .cu_ack, .ex_valid, .ex, .ex_ready);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    @(posedge clk); @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int it = 0; it < 1000; it++) begin
      logic [1:0] v; int exp;
      v = 2'($urandom);
      cu_valid <= v; ex_ready <= ($urandom % 4) != 0;
      cu_data[0] <= '0; cu_data[1] <= '0;
      cu_data[0].iss.pc <= 32'h100 + it; cu_data[1].iss.pc <= 32'h200 + it;
      #1;
      `CHECK(ex_valid == (v != 0), "valid")
      if (v != 0) begin
        exp = (v == 2'b11) ? (1 - last) : (v[0] ? 0 : 1);
        `CHECK(ex.iss.pc == 32'(((exp == 0) ? 32'h100 : 32'h200) + it), $sformatf("picked wrong CU, exp %0d", exp))
        `CHECK(cu_ack == (ex_ready ? 2'(1 << exp) : 2'b00), "ack")
        if (ex_ready) last = exp;
      end else `CHECK(cu_ack == 0, "no ack when idle")
      @(posedge clk);
    end
    `TB_FINISH
  end
endmodule
