// Testbench for warp_shift_register: loads random nibbles and checks that the
// output presents bits 0,1,2,3 of the loaded value on four consecutive
// shifts, with idle cycles in between that must not disturb the contents.
`include "tb_check.svh"
module tb_warp_shift_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, dout;
  logic [3:0] din = 0;
  always #5 clk = ~clk;
  warp_shift_register #(.WIDTH(4)) dut (.clk, .rst_n, .load, .shift, .din, .dout);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    logic [3:0] v;
    int n;
    @(posedge clk); @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int g = 0; g < 60; g++) begin
      v = 4'($urandom);
      // first bit comes straight from the loaded value
      din <= v; load <= 1; shift <= 1; #1;
      `CHECK(dout == v[0], $sformatf("group %0d bit0", g))
      @(posedge clk);
      load <= 0; din <= 4'($urandom);
      for (int j = 1; j < 4; j++) begin
        // idle cycles keep the value
        n = $urandom % 3;
        if (n > 0) begin
          shift <= 0;
          repeat (n) @(posedge clk);
        end
        shift <= 1; #1;
        `CHECK(dout == v[j], $sformatf("group %0d bit%0d got %0b", g, j, dout))
        @(posedge clk);
      end
    end
    // load without shift holds the nibble
    din <= 4'b0110; load <= 1; shift <= 0; @(posedge clk); load <= 0; shift <= 1; #1;
    `CHECK(dout == 1'b0, "held bit0")
    @(posedge clk); #1;
    `CHECK(dout == 1'b1, "held bit1")
    `TB_FINISH
  end
endmodule
