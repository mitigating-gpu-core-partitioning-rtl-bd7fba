// Testbench for assign_counter: random increment pattern against a software
// count modulo 4, including wrap-around and reset.
`include "tb_check.svh"
module tb_assign_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, inc = 0;
  logic [1:0] count;
  int model = 0;
  always #5 clk = ~clk;
  assign_counter #(.WIDTH(2)) dut (.clk, .rst_n, .inc, .count);
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    @(posedge clk); @(posedge clk); rst_n <= 1;
    @(posedge clk); #1;
    `CHECK(count == 0, "reset value")
    for (int i = 0; i < 200; i++) begin
      inc <= ($urandom % 3) != 0;
      @(posedge clk); #1;
      if (inc) model = (model + 1) % 4;
      `CHECK(count == 2'(model), $sformatf("count %0d exp %0d", count, model))
    end
    inc <= 0; rst_n <= 0; @(posedge clk); #1;
    `CHECK(count == 0, "synchronous reset")
    `TB_FINISH
  end
endmodule
