// Testbench for sm_interconnect_arbiter. A random sub-core choice stands in
// for the assignment unit and random table-full conditions for the
// sub-cores. Checks: one warp load per accepted cycle, routed only to the
// chosen sub-core, with the block's PC and slot and the lowest free warp id
// (ids of a completed block are reused);
// a full table stalls the load (and is counted); no new launch is accepted
// while loading; a block is reported done exactly when its last warp exits,
// never earlier, and two blocks finishing together are reported on
// consecutive cycles.
`include "tb_check.svh"
module tb_sm_interconnect_arbiter;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic launch_valid = 0, launch_ready, tb_done_valid, assign_advance, load_stall;
  tb_launch_t launch = '0;
  logic [TB_W-1:0] tb_done_tb;
  logic [SC_W-1:0] assign_subcore = '0;
  logic [NUM_SUBCORES-1:0] load_valid, load_ready = '1, warp_done_valid = '0;
  warp_load_t load;
  logic [NUM_SUBCORES-1:0][TB_W-1:0] warp_done_tb = '0;
  int loads = 0, stalls = 0;
  bit used [64];
  int owner [64];
  function automatic int exp_wid();
    for (int w = 0; w < 64; w++) if (!used[w]) return w;
    return -1;
  endfunction
  // ids of a completed block return to the pool
  always @(posedge clk) if (tb_done_valid)
    for (int w = 0; w < 64; w++) if (used[w] && owner[w] == int'(tb_done_tb)) used[w] = 0;
  always #5 clk = ~clk;
  sm_interconnect_arbiter dut (.clk, .rst_n, .launch_valid, .launch, .launch_ready,
    .tb_done_valid, .tb_done_tb, .assign_advance, .assign_subcore,
    .load_valid, .load, .load_ready, .load_stall, .warp_done_valid, .warp_done_tb);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  task automatic launch_tb(input int tb, input int n, input int pc);
    int got;
    launch_valid <= 1; launch <= '{tb: TB_W'(tb), nwarps: NWARP_W'(n), pc: 32'(pc)};
    #1; `CHECK(launch_ready, "idle arbiter accepts a launch")
    @(posedge clk);
    launch_valid <= 1; launch <= '{tb: 5'd31, nwarps: 7'd1, pc: 32'hdead};  // must wait
    got = 0;
    while (got < n) begin
      logic [SC_W-1:0] sc; logic [NUM_SUBCORES-1:0] rdy;
      sc = SC_W'($urandom); rdy = NUM_SUBCORES'($urandom) | 4'b0001;
      assign_subcore <= sc; load_ready <= rdy;
      #1;
      `CHECK(!launch_ready, "busy while loading")
      `CHECK(load_valid == NUM_SUBCORES'(1 << sc), "routed to the chosen sub-core")
      `CHECK(load.tb == TB_W'(tb) && load.pc == 32'(pc) && int'(load.warp_id) == exp_wid(), $sformatf("load contents wid %0d exp %0d", load.warp_id, exp_wid()))
      `CHECK(assign_advance == rdy[sc] && load_stall == !rdy[sc], "advance only when the table has room")
      if (rdy[sc]) begin int w; w = exp_wid(); got++; used[w] = 1; owner[w] = tb; loads++; end else stalls++;
      @(posedge clk);
    end
    launch_valid <= 0; load_ready <= '1;
    #1; `CHECK(load_valid == 0 && launch_ready, "idle after last warp")
  endtask

  initial begin
    @(posedge clk); @(posedge clk); rst_n <= 1; @(posedge clk);
    launch_tb(4, 7, 'h800);
    launch_tb(9, 5, 'h900);
    // retire warps of both blocks; block 4 has 7 warps, block 9 has 5
    for (int k = 0; k < 6; k++) begin
      warp_done_valid <= 4'b0011; warp_done_tb <= {5'd0, 5'd0, 5'd9, 5'd4};
      if (k == 5) begin warp_done_valid <= 4'b0001; end
      @(posedge clk); #1;
      `CHECK(!tb_done_valid || k == 4, $sformatf("no early completion (step %0d)", k))
      if (k == 4) `CHECK(tb_done_valid && tb_done_tb == 5'd9, "block 9 done after its 5th warp")
    end
    warp_done_valid <= 4'b0000;
    // block 4 had 6 of 7 warps retired; finish it with two reports at once
    // together with a new block of 1 warp launched and finished
    launch_tb(2, 1, 'h100);
    warp_done_valid <= 4'b1001; warp_done_tb <= {5'd2, 5'd0, 5'd0, 5'd4};
    @(posedge clk); warp_done_valid <= 0; #1;
    `CHECK(tb_done_valid && tb_done_tb == 5'd2, "lowest completed block first");
    @(posedge clk); #1;
    `CHECK(tb_done_valid && tb_done_tb == 5'd4, "second completion next cycle");
    @(posedge clk); #1;
    `CHECK(!tb_done_valid, "each completion reported once");
    // ids 0..6 (block 4) and 7..11 (block 9) were freed: a new block reuses 0..
    launch_tb(6, 3, 'h300);
    `CHECK(stalls > 0, "table-full stall exercised")
    $display("loads %0d stalls %0d", loads, stalls);
    `TB_FINISH
  end
endmodule
